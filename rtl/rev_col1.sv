// rev_col1: column 1 of the 4x4 column-wise reversible multiplier.
//
// Adds the partial products P01 = a0.b1 and P10 = a1.b0 into a 2-bit
// counter {C12, S1} held on two ancilla lines. The first gate generates P01
// on the S1 line; P10 is then added by a three-control gate that sets the
// carry C12 when P10 and S1 are both 1, followed by a Toffoli that toggles
// S1. Operand lines a1..a0 and b1..b0 pass through unchanged (6 lines in,
// 6 out, no garbage), as in the published block. The exact gate order is this
// design's: the published circuit drawing is followed only in its grouping.
//
// Interface: anc_i[0] becomes S1, anc_i[1] becomes C12; both are 0 for
// multiplication. Timing: purely combinational; no clock or reset.
module rev_col1 (
  input  logic [1:0] b_i,
  input  logic [1:0] a_i,
  input  logic [1:0] anc_i,
  output logic [1:0] b_o,
  output logic [1:0] a_o,
  output logic       s1_o,
  output logic       c12_o
);

  logic s, c12;

  always_comb begin
    s   = anc_i[0];
    c12 = anc_i[1];
    // Generation of P01
    s   ^= a_i[0] & b_i[1];                // gate 1
    // Generation of P10 and adding it to P01
    c12 ^= a_i[1] & b_i[0] & s;            // gate 2
    s   ^= a_i[1] & b_i[0];                // gate 3
    b_o   = b_i;
    a_o   = a_i;
    s1_o  = s;
    c12_o = c12;
  end

endmodule
