// tb_rev_col6: exhaustive self-checking testbench for rev_col6.
//
// Applies all 2^5 combinations of the block's 5 input lines. For every
// combination it checks that the output pattern has not been produced before,
// so the block is shown to be a bijection (reversible). For every combination
// with the ancillas at 0 it also checks the column function, {C67,S6} = a3.b3 + C46 + C56,
// against a sum of the partial products computed here from the inputs, and
// that the pass-through and garbage lines carry the expected operand or carry
// bits. The block is combinational; each combination is held for 1 time unit.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_col6;

  localparam int NL = 5;

  logic b3_i, a3_i, c46_i, c56_i, anc_i; logic s6_o, c67_o, g_b3_o, g_a3_o, g_c46_o;
  logic [NL-1:0] out_vec;
  int   sum;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [2**NL];

  rev_col6 dut (.*);

  function automatic int b2i(logic x);
    return x ? 1 : 0;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 2**NL; v++) begin
      {anc_i, c56_i, c46_i, a3_i, b3_i} = NL'(v);
      #1;
      out_vec = {c67_o, s6_o, g_c46_o, g_a3_o, g_b3_o};
      checks++;
      if (seen[out_vec]) begin
        failures++;
        $display("not one-to-one: input %b gives repeated output %b", NL'(v), out_vec);
      end
      seen[out_vec] = 1'b1;
      if (anc_i == 1'b0) begin
        sum = b2i(a3_i & b3_i) + b2i(c46_i) + b2i(c56_i);
        checks++;
        if ({c67_o, s6_o} != 2'(sum) || !(g_b3_o == b3_i && g_a3_o == a3_i && g_c46_o == c46_i)) begin
          failures++;
          $display("wrong result: input %b sum %0d output %b", NL'(v), sum, out_vec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
