// tb_rev_col5: exhaustive self-checking testbench for rev_col5.
//
// Applies all 2^8 combinations of the block's 8 input lines. For every
// combination it checks that the output pattern has not been produced before,
// so the block is shown to be a bijection (reversible). For every combination
// with the ancillas at 0 it also checks the column function, {C57,C56,S5} = a2.b3 + a3.b2 + C35 + C45,
// against a sum of the partial products computed here from the inputs, and
// that the pass-through and garbage lines carry the expected operand or carry
// bits. The block is combinational; each combination is held for 1 time unit.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_col5;

  localparam int NL = 8;

  logic [3:2] b_i, a_i; logic c35_i, c45_i; logic [1:0] anc_i; logic b3_o, a3_o, s5_o, c56_o, c57_o, g_b2_o, g_a2_o, g_c35_o;
  logic [NL-1:0] out_vec;
  int   sum;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [2**NL];

  rev_col5 dut (.*);

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
      {anc_i, c45_i, c35_i, a_i, b_i} = NL'(v);
      #1;
      out_vec = {c57_o, c56_o, s5_o, g_c35_o, g_a2_o, g_b2_o, a3_o, b3_o};
      checks++;
      if (seen[out_vec]) begin
        failures++;
        $display("not one-to-one: input %b gives repeated output %b", NL'(v), out_vec);
      end
      seen[out_vec] = 1'b1;
      if (anc_i == 2'b0) begin
        sum = b2i(a_i[2] & b_i[3]) + b2i(a_i[3] & b_i[2]) + b2i(c35_i) + b2i(c45_i);
        checks++;
        if ({c57_o, c56_o, s5_o} != 3'(sum) || !(b3_o == b_i[3] && a3_o == a_i[3] && g_b2_o == b_i[2] && g_a2_o == a_i[2] && g_c35_o == c35_i)) begin
          failures++;
          $display("wrong result: input %b sum %0d output %b", NL'(v), sum, out_vec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
