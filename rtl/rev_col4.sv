// rev_col4: column 4 of the 4x4 column-wise reversible multiplier.
//
// Column 4 sums P13, P22, P31 and the carries C24 and C34, at most 5, into a
// 3-bit counter {C46, C45, S4}. The C34 line becomes S4; two ancilla lines
// become C45 (carry into column 5) and C46 (carry into column 6). The three
// products are added by controlled increments (top counter bit first; the
// total is at most 2 before P22, so only P31 and C24 need a top-bit gate),
// then C24 is added the same way with the C24 line as the only control besides the
// counter bits. b1, a1 and the C24 line are not needed any further and leave
// as garbage; b3..b2 and a3..a2 pass on. 10 lines in, 10 out (7 main,
// 3 garbage), matching the published line counts. 10 gates.
//
// The ports, the garbage lines and the order P13, P22, P31, C24 follow the
// published block; the individual gates are this design's own, chosen so
// that the whole multiplier has the published total of 43 gates.
//
// Interface: anc_i[0] becomes C45, anc_i[1] becomes C46 (both 0 for
// multiplication). Timing: purely combinational; no clock or reset.
module rev_col4 (
  input  logic [3:1] b_i,
  input  logic [3:1] a_i,
  input  logic       c24_i,
  input  logic       c34_i,
  input  logic [1:0] anc_i,
  output logic [3:2] b_o,
  output logic [3:2] a_o,
  output logic       s4_o,
  output logic       c45_o,
  output logic       c46_o,
  output logic       g_b1_o,
  output logic       g_a1_o,
  output logic       g_c24_o
);

  logic s, c45, c46;

  always_comb begin
    s   = c34_i;
    c45 = anc_i[0];
    c46 = anc_i[1];
    // Generation of P13 and adding it to C34
    c45 ^= a_i[1] & b_i[3] & s;                 // gate 1
    s   ^= a_i[1] & b_i[3];                     // gate 2
    // Generation of P22 and adding it to the sum
    c45 ^= a_i[2] & b_i[2] & s;                 // gate 3
    s   ^= a_i[2] & b_i[2];                     // gate 4
    // Generation of P31 and adding it to the sum
    c46 ^= a_i[3] & b_i[1] & s & c45;           // gate 5
    c45 ^= a_i[3] & b_i[1] & s;                 // gate 6
    s   ^= a_i[3] & b_i[1];                     // gate 7
    // Adding the C24 carry bit to the sum
    c46 ^= c24_i & s & c45;                     // gate 8
    c45 ^= c24_i & s;                           // gate 9
    s   ^= c24_i;                               // gate 10
    b_o     = b_i[3:2];
    a_o     = a_i[3:2];
    s4_o    = s;
    c45_o   = c45;
    c46_o   = c46;
    g_b1_o  = b_i[1];
    g_a1_o  = a_i[1];
    g_c24_o = c24_i;
  end

endmodule
