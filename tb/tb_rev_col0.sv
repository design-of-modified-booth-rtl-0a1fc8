// tb_rev_col0: exhaustive self-checking testbench for rev_col0.
//
// Applies all 2^3 combinations of the block's 3 input lines. For every
// combination it checks that the output pattern has not been produced before,
// so the block is shown to be a bijection (reversible). For every combination
// with the ancillas at 0 it also checks the column function, S0 = a0.b0; a0 and b0 pass through,
// against a sum of the partial products computed here from the inputs, and
// that the pass-through and garbage lines carry the expected operand or carry
// bits. The block is combinational; each combination is held for 1 time unit.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_col0;

  localparam int NL = 3;

  logic b0_i, a0_i, anc_i, b0_o, a0_o, s0_o;
  logic [NL-1:0] out_vec;
  int   sum;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [2**NL];

  rev_col0 dut (.*);

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
      {anc_i, a0_i, b0_i} = NL'(v);
      #1;
      out_vec = {s0_o, a0_o, b0_o};
      checks++;
      if (seen[out_vec]) begin
        failures++;
        $display("not one-to-one: input %b gives repeated output %b", NL'(v), out_vec);
      end
      seen[out_vec] = 1'b1;
      if (anc_i == 1'b0) begin
        sum = b2i(a0_i & b0_i);
        checks++;
        if ({s0_o} != 1'(sum) || !(b0_o == b0_i && a0_o == a0_i)) begin
          failures++;
          $display("wrong result: input %b sum %0d output %b", NL'(v), sum, out_vec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
