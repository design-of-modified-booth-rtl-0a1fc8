// rev_col6: column 6 of the 4x4 column-wise reversible multiplier.
//
// Column 6 sums P33 = a3.b3 and the carries C46 and C56, at most 3, into a
// 2-bit counter {C67, S6}. The C56 line becomes S6 and one ancilla line
// becomes C67, the carry into column 7. P33 is added by a three-control gate
// onto C67 and a Toffoli onto S6; C46 is then added by a Toffoli onto C67 and
// a controlled-NOT onto S6. b3, a3 and the C46 line leave as garbage. 5 lines
// in, 5 out (2 main, 3 garbage), matching the published line counts.
//
// The ports, the garbage lines and the order P33, C46 follow the published
// block; the individual gates are this design's own.
//
// Interface: anc_i becomes C67 (0 for multiplication). Timing: purely
// combinational; no clock or reset.
module rev_col6 (
  input  logic b3_i,
  input  logic a3_i,
  input  logic c46_i,
  input  logic c56_i,
  input  logic anc_i,
  output logic s6_o,
  output logic c67_o,
  output logic g_b3_o,
  output logic g_a3_o,
  output logic g_c46_o
);

  logic s, c67;

  always_comb begin
    s   = c56_i;
    c67 = anc_i;
    // Generation of P33 and adding it to C56
    c67 ^= a3_i & b3_i & s;                     // gate 1
    s   ^= a3_i & b3_i;                         // gate 2
    // Adding the C46 carry bit to the sum
    c67 ^= c46_i & s;                           // gate 3
    s   ^= c46_i;                               // gate 4
    s6_o    = s;
    c67_o   = c67;
    g_b3_o  = b3_i;
    g_a3_o  = a3_i;
    g_c46_o = c46_i;
  end

endmodule
