// tb_rev_col2: exhaustive self-checking testbench for rev_col2.
//
// Applies all 2^9 combinations of the block's 9 input lines. For every
// combination it checks that the output pattern has not been produced before,
// so the block is shown to be a bijection (reversible). For every combination
// with the ancillas at 0 it also checks the column function, {C24,C23,S2} = a0.b2 + a1.b1 + a2.b0 + C12; operands pass through,
// against a sum of the partial products computed here from the inputs, and
// that the pass-through and garbage lines carry the expected operand or carry
// bits. The block is combinational; each combination is held for 1 time unit.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_col2;

  localparam int NL = 9;

  logic [2:0] b_i, a_i, b_o, a_o; logic c12_i; logic [1:0] anc_i; logic s2_o, c23_o, c24_o;
  logic [NL-1:0] out_vec;
  int   sum;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [2**NL];

  rev_col2 dut (.*);

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
      {anc_i, c12_i, a_i, b_i} = NL'(v);
      #1;
      out_vec = {c24_o, c23_o, s2_o, a_o, b_o};
      checks++;
      if (seen[out_vec]) begin
        failures++;
        $display("not one-to-one: input %b gives repeated output %b", NL'(v), out_vec);
      end
      seen[out_vec] = 1'b1;
      if (anc_i == 2'b0) begin
        sum = b2i(a_i[0] & b_i[2]) + b2i(a_i[1] & b_i[1]) + b2i(a_i[2] & b_i[0]) + b2i(c12_i);
        checks++;
        if ({c24_o, c23_o, s2_o} != 3'(sum) || !(b_o == b_i && a_o == a_i)) begin
          failures++;
          $display("wrong result: input %b sum %0d output %b", NL'(v), sum, out_vec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
