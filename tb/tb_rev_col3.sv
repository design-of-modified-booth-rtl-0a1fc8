// tb_rev_col3: exhaustive self-checking testbench for rev_col3.
//
// Applies all 2^11 combinations of the block's 11 input lines. For every
// combination it checks that the output pattern has not been produced before,
// so the block is shown to be a bijection (reversible). For every combination
// with the ancillas at 0 it also checks the column function, {C35,C34,S3} = a0.b3 + a1.b2 + a2.b1 + a3.b0 + C23; b0, a0 leave as garbage,
// against a sum of the partial products computed here from the inputs, and
// that the pass-through and garbage lines carry the expected operand or carry
// bits. The block is combinational; each combination is held for 1 time unit.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_col3;

  localparam int NL = 11;

  logic [3:0] b_i, a_i; logic [3:1] b_o, a_o; logic c23_i; logic [1:0] anc_i; logic s3_o, c34_o, c35_o, g_b0_o, g_a0_o;
  logic [NL-1:0] out_vec;
  int   sum;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [2**NL];

  rev_col3 dut (.*);

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
      {anc_i, c23_i, a_i, b_i} = NL'(v);
      #1;
      out_vec = {c35_o, c34_o, s3_o, g_a0_o, g_b0_o, a_o, b_o};
      checks++;
      if (seen[out_vec]) begin
        failures++;
        $display("not one-to-one: input %b gives repeated output %b", NL'(v), out_vec);
      end
      seen[out_vec] = 1'b1;
      if (anc_i == 2'b0) begin
        sum = b2i(a_i[0] & b_i[3]) + b2i(a_i[1] & b_i[2]) + b2i(a_i[2] & b_i[1]) + b2i(a_i[3] & b_i[0]) + b2i(c23_i);
        checks++;
        if ({c35_o, c34_o, s3_o} != 3'(sum) || !(b_o == b_i[3:1] && a_o == a_i[3:1] && g_b0_o == b_i[0] && g_a0_o == a_i[0])) begin
          failures++;
          $display("wrong result: input %b sum %0d output %b", NL'(v), sum, out_vec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
