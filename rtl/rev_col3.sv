// rev_col3: column 3 of the 4x4 column-wise reversible multiplier.
//
// Column 3 sums the four partial products P03, P12, P21, P30 and the carry
// C23, at most 5, into a 3-bit counter {C35, C34, S3}. The C23 line becomes
// S3; two ancilla lines become C34 (carry into column 4) and C35 (carry into
// column 5). Each product is added by a controlled increment, top counter bit
// first. The total is at most 2 before P12 is added, so the top-bit gate is
// only needed for P21 and P30 (10 gates). This is the last column that uses a0 and b0, so those two
// lines leave as garbage; b3..b1 and a3..a1 pass on unchanged. 11 lines in,
// 11 out (9 main, 2 garbage), matching the published line counts.
//
// The ports, the garbage lines and the order P03, P12, P21, P30 follow the
// published block; the individual gates are this design's own, chosen so
// that the whole multiplier has the published total of 43 gates.
//
// Interface: anc_i[0] becomes C34, anc_i[1] becomes C35 (both 0 for
// multiplication). Timing: purely combinational; no clock or reset.
module rev_col3 (
  input  logic [3:0] b_i,
  input  logic [3:0] a_i,
  input  logic       c23_i,
  input  logic [1:0] anc_i,
  output logic [3:1] b_o,
  output logic [3:1] a_o,
  output logic       s3_o,
  output logic       c34_o,
  output logic       c35_o,
  output logic       g_b0_o,
  output logic       g_a0_o
);

  logic s, c34, c35;

  always_comb begin
    s   = c23_i;
    c34 = anc_i[0];
    c35 = anc_i[1];
    // Generation of P03 and adding it to C23
    c34 ^= a_i[0] & b_i[3] & s;                 // gate 1
    s   ^= a_i[0] & b_i[3];                     // gate 2
    // Generation of P12 and adding it to the sum
    c34 ^= a_i[1] & b_i[2] & s;                 // gate 3
    s   ^= a_i[1] & b_i[2];                     // gate 4
    // Generation of P21 and adding it to the sum
    c35 ^= a_i[2] & b_i[1] & s & c34;           // gate 5
    c34 ^= a_i[2] & b_i[1] & s;                 // gate 6
    s   ^= a_i[2] & b_i[1];                     // gate 7
    // Generation of P30 and adding it to the sum
    c35 ^= a_i[3] & b_i[0] & s & c34;           // gate 8
    c34 ^= a_i[3] & b_i[0] & s;                 // gate 9
    s   ^= a_i[3] & b_i[0];                     // gate 10
    b_o    = b_i[3:1];
    a_o    = a_i[3:1];
    s3_o   = s;
    c34_o  = c34;
    c35_o  = c35;
    g_b0_o = b_i[0];
    g_a0_o = a_i[0];
  end

endmodule
