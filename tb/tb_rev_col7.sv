// tb_rev_col7: exhaustive self-checking testbench for rev_col7.
//
// Applies all 2^2 combinations of the block's 2 input lines. For every
// combination it checks that the output pattern has not been produced before,
// so the block is shown to be a bijection (reversible). For every combination
// with the two carries not both 1 it also checks the column function, S7 = C57 + C67 (the two carries are never both 1 in a 4x4 product),
// against a sum of the partial products computed here from the inputs, and
// that the pass-through and garbage lines carry the expected operand or carry
// bits. The block is combinational; each combination is held for 1 time unit.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_rev_col7;

  localparam int NL = 2;

  logic c57_i, c67_i, s7_o, g_c57_o;
  logic [NL-1:0] out_vec;
  int   sum;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [2**NL];

  rev_col7 dut (.*);

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
      {c67_i, c57_i} = NL'(v);
      #1;
      out_vec = {s7_o, g_c57_o};
      checks++;
      if (seen[out_vec]) begin
        failures++;
        $display("not one-to-one: input %b gives repeated output %b", NL'(v), out_vec);
      end
      seen[out_vec] = 1'b1;
      if (!(c57_i && c67_i)) begin
        sum = b2i(c57_i) + b2i(c67_i);
        checks++;
        if ({s7_o} != 1'(sum) || !(g_c57_o == c57_i)) begin
          failures++;
          $display("wrong result: input %b sum %0d output %b", NL'(v), sum, out_vec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
