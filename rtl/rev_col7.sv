// rev_col7: column 7 of the 4x4 column-wise reversible multiplier.
//
// The top product bit is S7 = C57 + C67. A 4x4 product is below 256, so the
// two carries are never 1 together and one controlled-NOT (control C57,
// target the C67 line) forms S7 without a carry out. The C57 line leaves as
// garbage. 2 lines in, 2 out (1 main, 1 garbage), as in the published block.
//
// Interface: one line per port; no ancilla. Timing: purely combinational; no
// clock or reset.
module rev_col7 (
  input  logic c57_i,
  input  logic c67_i,
  output logic s7_o,
  output logic g_c57_o
);

  always_comb begin
    s7_o    = c67_i ^ c57_i;                    // gate 1
    g_c57_o = c57_i;
  end

endmodule
