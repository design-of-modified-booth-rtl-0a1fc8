// rev_col2: column 2 of the 4x4 column-wise reversible multiplier.
//
// Column 2 sums P02 = a0.b2, P11 = a1.b1, P20 = a2.b0 and the incoming carry
// C12, at most 4, into a 3-bit counter {C24, C23, S2}. The line that enters
// carrying C12 becomes S2; two ancilla lines become C23 (carry into column 3)
// and C24 (carry into column 4). Each partial product is added in place by a
// controlled increment: first the most significant counter bit is toggled
// when the product and all lower counter bits are 1, then the next bit, then
// S2 itself. A top-bit gate is only kept where the total can already be 3:
// before P02 it is at most 1 and before P11 at most 2, so only the P20
// addition needs one. Operand lines pass through unchanged (9 lines in, 9
// out). 7 gates.
//
// The published block fixes the ports and the order in which P02, P11 and
// P20 are added; the individual gates are this design's own, chosen so that
// the whole multiplier has the published total of 43 gates.
//
// Interface: anc_i[0] becomes C23, anc_i[1] becomes C24 (both 0 for
// multiplication). Timing: purely combinational; no clock or reset.
module rev_col2 (
  input  logic [2:0] b_i,
  input  logic [2:0] a_i,
  input  logic       c12_i,
  input  logic [1:0] anc_i,
  output logic [2:0] b_o,
  output logic [2:0] a_o,
  output logic       s2_o,
  output logic       c23_o,
  output logic       c24_o
);

  logic s, c23, c24;

  always_comb begin
    s   = c12_i;
    c23 = anc_i[0];
    c24 = anc_i[1];
    // Generation of P02 and adding it to C12
    c23 ^= a_i[0] & b_i[2] & s;                 // gate 1
    s   ^= a_i[0] & b_i[2];                     // gate 2
    // Generation of P11 and adding it to the sum
    c23 ^= a_i[1] & b_i[1] & s;                 // gate 3
    s   ^= a_i[1] & b_i[1];                     // gate 4
    // Generation of P20 and adding it to the sum
    c24 ^= a_i[2] & b_i[0] & s & c23;           // gate 5
    c23 ^= a_i[2] & b_i[0] & s;                 // gate 6
    s   ^= a_i[2] & b_i[0];                     // gate 7
    b_o   = b_i;
    a_o   = a_i;
    s2_o  = s;
    c23_o = c23;
    c24_o = c24;
  end

endmodule
