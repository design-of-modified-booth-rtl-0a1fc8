// rev_col5: column 5 of the 4x4 column-wise reversible multiplier.
//
// Column 5 sums P23, P32 and the carries C35 and C45, at most 4, into a 3-bit
// counter {C57, C56, S5}. The C45 line becomes S5; two ancilla lines become
// C56 (carry into column 6) and C57 (carry into column 7). P23 and P32 are
// added by controlled increments (top counter bit first; the total is at
// most 2 before P32, so only the C35 addition needs a top-bit gate), then C35
// is added the same way (7 gates). b2, a2 and the C35 line leave as garbage; b3 and a3 pass on. 8 lines
// in, 8 out (5 main, 3 garbage), matching the published line counts.
//
// The ports, the garbage lines and the order P23, P32, C35 follow the
// published block; the individual gates are this design's own, chosen so
// that the whole multiplier has the published total of 43 gates.
//
// Interface: anc_i[0] becomes C56, anc_i[1] becomes C57 (both 0 for
// multiplication). Timing: purely combinational; no clock or reset.
module rev_col5 (
  input  logic [3:2] b_i,
  input  logic [3:2] a_i,
  input  logic       c35_i,
  input  logic       c45_i,
  input  logic [1:0] anc_i,
  output logic       b3_o,
  output logic       a3_o,
  output logic       s5_o,
  output logic       c56_o,
  output logic       c57_o,
  output logic       g_b2_o,
  output logic       g_a2_o,
  output logic       g_c35_o
);

  logic s, c56, c57;

  always_comb begin
    s   = c45_i;
    c56 = anc_i[0];
    c57 = anc_i[1];
    // Generation of P23 and adding it to C45
    c56 ^= a_i[2] & b_i[3] & s;                 // gate 1
    s   ^= a_i[2] & b_i[3];                     // gate 2
    // Generation of P32 and adding it to the sum
    c56 ^= a_i[3] & b_i[2] & s;                 // gate 3
    s   ^= a_i[3] & b_i[2];                     // gate 4
    // Adding the C35 carry bit to the sum
    c57 ^= c35_i & s & c56;                     // gate 5
    c56 ^= c35_i & s;                           // gate 6
    s   ^= c35_i;                               // gate 7
    b3_o    = b_i[3];
    a3_o    = a_i[3];
    s5_o    = s;
    c56_o   = c56;
    c57_o   = c57;
    g_b2_o  = b_i[2];
    g_a2_o  = a_i[2];
    g_c35_o = c35_i;
  end

endmodule
