// rev_col0: column 0 of the 4x4 column-wise reversible multiplier.
//
// Column 0 holds the single partial product a0.b0, so the block is one
// Toffoli gate (two controls a0, b0; target the ancilla line): with the
// ancilla at 0 the target leaves as S0 = a0.b0. Operand lines a0 and b0
// pass through unchanged for use by the next column, as in the published
// block diagram (3 lines in, 3 lines out, no garbage).
//
// Interface: one line per port; anc_i is the ancilla (0 for multiplication).
// Timing: purely combinational, like the reversible circuit it models; no
// clock or reset.
module rev_col0 (
  input  logic b0_i,
  input  logic a0_i,
  input  logic anc_i,
  output logic b0_o,
  output logic a0_o,
  output logic s0_o
);

  always_comb begin
    b0_o = b0_i;
    a0_o = a0_i;
    s0_o = anc_i ^ (a0_i & b0_i);   // gate 1: P00 onto the ancilla
  end

endmodule
