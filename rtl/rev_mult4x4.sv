// rev_mult4x4: 4x4 unsigned multiplier built as one reversible circuit,
// one block per column of the multiplication.
//
// Instead of a partial-product generator followed by an adder array, each
// column j of the paper-and-pencil multiplication is a single reversible
// block (rev_col0 .. rev_col7) that forms its own partial products a_i.b_k
// (i + k = j), adds them to the carries arriving from lower columns and
// produces the product bit S_j and the carries C_jk for the columns above.
// The operand bits are only ever used as gate controls, so they pass from
// one column to the next unchanged and no separate fan-out circuit is
// needed; a column that is the last user of an operand bit or of a carry
// releases that line as a garbage output.
//
// Line budget (matching the published architecture): 8 operand lines plus
// 12 ancilla lines in, 8 product lines plus 12 garbage lines out, so the
// whole module is a bijection on 20 bits. The columns use 1, 3, 7, 10,
// 10, 7, 4 and 1 controlled-NOT gates: 43, the published gate count.
//
// Interface: a, b are the unsigned operands; anc must be all 0 for p to be
// a * b. garbage carries the operand bits and the four carries C24, C35, C46,
// C57 (see rev_mult_pkg::garbage_t). With a nonzero anc the outputs are still
// a one-to-one function of all 20 inputs, but p is no longer the product.
// Timing: purely combinational, no clock or reset.
module rev_mult4x4
  import rev_mult_pkg::*;
(
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  ancilla_t       anc,
  output logic [2*N-1:0] p,
  output garbage_t       garbage
);

  // The line budget: 20 lines in, 20 lines out.
  if ($bits(ancilla_t) != N_ANCILLA || $bits(garbage_t) != N_GARBAGE) begin : g_budget_error
    $error("ancilla or garbage struct does not match the line budget");
  end

  // Operand lines as they leave each column.
  logic       col0_b0, col0_a0;
  logic [1:0] col1_b, col1_a;
  logic [2:0] col2_b, col2_a;
  logic [3:1] col3_b, col3_a;
  logic [3:2] col4_b, col4_a;
  logic       col5_b3, col5_a3;

  // Carries C_ij: generated in column i, added in column j.
  logic c12, c23, c24, c34, c35, c45, c46, c56, c57, c67;

  rev_col0 u_col0 (
    .b0_i (b[0]),         .a0_i (a[0]),         .anc_i (anc.s0),
    .b0_o (col0_b0),      .a0_o (col0_a0),      .s0_o  (p[0])
  );

  rev_col1 u_col1 (
    .b_i   ({b[1], col0_b0}),
    .a_i   ({a[1], col0_a0}),
    .anc_i ({anc.c12, anc.s1}),
    .b_o   (col1_b),
    .a_o   (col1_a),
    .s1_o  (p[1]),
    .c12_o (c12)
  );

  rev_col2 u_col2 (
    .b_i   ({b[2], col1_b}),
    .a_i   ({a[2], col1_a}),
    .c12_i (c12),
    .anc_i ({anc.c24, anc.c23}),
    .b_o   (col2_b),
    .a_o   (col2_a),
    .s2_o  (p[2]),
    .c23_o (c23),
    .c24_o (c24)
  );

  rev_col3 u_col3 (
    .b_i    ({b[3], col2_b}),
    .a_i    ({a[3], col2_a}),
    .c23_i  (c23),
    .anc_i  ({anc.c35, anc.c34}),
    .b_o    (col3_b),
    .a_o    (col3_a),
    .s3_o   (p[3]),
    .c34_o  (c34),
    .c35_o  (c35),
    .g_b0_o (garbage.b0),
    .g_a0_o (garbage.a0)
  );

  rev_col4 u_col4 (
    .b_i     (col3_b),
    .a_i     (col3_a),
    .c24_i   (c24),
    .c34_i   (c34),
    .anc_i   ({anc.c46, anc.c45}),
    .b_o     (col4_b),
    .a_o     (col4_a),
    .s4_o    (p[4]),
    .c45_o   (c45),
    .c46_o   (c46),
    .g_b1_o  (garbage.b1),
    .g_a1_o  (garbage.a1),
    .g_c24_o (garbage.c24)
  );

  rev_col5 u_col5 (
    .b_i     (col4_b),
    .a_i     (col4_a),
    .c35_i   (c35),
    .c45_i   (c45),
    .anc_i   ({anc.c57, anc.c56}),
    .b3_o    (col5_b3),
    .a3_o    (col5_a3),
    .s5_o    (p[5]),
    .c56_o   (c56),
    .c57_o   (c57),
    .g_b2_o  (garbage.b2),
    .g_a2_o  (garbage.a2),
    .g_c35_o (garbage.c35)
  );

  rev_col6 u_col6 (
    .b3_i    (col5_b3),
    .a3_i    (col5_a3),
    .c46_i   (c46),
    .c56_i   (c56),
    .anc_i   (anc.c67),
    .s6_o    (p[6]),
    .c67_o   (c67),
    .g_b3_o  (garbage.b3),
    .g_a3_o  (garbage.a3),
    .g_c46_o (garbage.c46)
  );

  rev_col7 u_col7 (
    .c57_i   (c57),
    .c67_i   (c67),
    .s7_o    (p[7]),
    .g_c57_o (garbage.c57)
  );

endmodule
