// tb_rev_mult4x4: end-to-end self-checking testbench for the 4x4 reversible
// multiplier rev_mult4x4, at its only (default) size.
//
// Part 1 drives all 256 operand pairs with every ancilla line at 0 and checks
// the product against a * b, and each garbage line against the operand bit or
// carry it must hold. The expected carries C24, C35, C46 and C57 are worked out
// here from column sums of the partial products.
// Part 2 drives all 2^20 combinations of the 20 input lines (operands and
// ancillas) and checks that no output pattern {garbage, p} repeats: the whole
// circuit is a bijection, which is what makes it reversible.
// Every carry C_ij between columns is a mechanism of the design; the test
// checks each one against the column sums, counts how often each one is 1
// during part 1 and counts a failure for any that never is. The circuit is combinational; each input is held 1 time unit.
module tb_rev_mult4x4;
  import rev_mult_pkg::*;

  localparam int NL = 2 * N + N_ANCILLA;   // 20 lines

  logic [N-1:0]   a, b;
  ancilla_t       anc;
  logic [2*N-1:0] p;
  garbage_t       garbage;

  int checks   = 0;
  int failures = 0;
  bit seen [2**NL];

  // How often each inter-column carry was 1 with the ancillas at 0.
  localparam int NC = 10;
  localparam string CARRY_NAME [NC] =
    '{"C12", "C23", "C24", "C34", "C35", "C45", "C46", "C56", "C57", "C67"};
  int carry_hits [NC];

  rev_mult4x4 dut (.*);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Partial products P[i][k] = a_i.b_k as integers.
  int P [N][N];

  initial begin : stimulus
    int col1, col2, col3, col4, col5, col6;
    garbage_t exp_g;
    logic [NL-1:0] out_vec;

    foreach (carry_hits[i]) carry_hits[i] = 0;

    // Part 1: multiplication with all ancillas at 0.
    anc = '0;
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      for (int i = 0; i < N; i++)
        for (int k = 0; k < N; k++)
          P[i][k] = (a[i] && b[k]) ? 1 : 0;
      col1 = P[0][1] + P[1][0];
      col2 = P[0][2] + P[1][1] + P[2][0] + (col1 >> 1);
      col3 = P[0][3] + P[1][2] + P[2][1] + P[3][0]
           + ((col2 >> 1) & 1);
      col4 = P[1][3] + P[2][2] + P[3][1]
           + ((col2 >> 2) & 1) + ((col3 >> 1) & 1);
      col5 = P[2][3] + P[3][2] + ((col3 >> 2) & 1) + ((col4 >> 1) & 1);
      col6 = P[3][3] + ((col4 >> 2) & 1) + ((col5 >> 1) & 1);

      exp_g = '{c57: 1'((col5 >> 2) & 1), c46: 1'((col4 >> 2) & 1),
                a3: a[3], b3: b[3],
                c35: 1'((col3 >> 2) & 1), a2: a[2], b2: b[2],
                c24: 1'((col2 >> 2) & 1), a1: a[1], b1: b[1],
                a0: a[0], b0: b[0]};

      checks++;
      if (p !== 8'(a * b)) begin
        failures++;
        $display("product: %0d * %0d gave %0d", a, b, p);
      end
      checks++;
      if (garbage !== exp_g) begin
        failures++;
        $display("garbage: %0d * %0d gave %b, expected %b", a, b, garbage, exp_g);
      end

      // The carries between the blocks must equal the bits of the column sums.
      checks++;
      if ({dut.c12, dut.c23, dut.c24, dut.c34, dut.c35,
           dut.c45, dut.c46, dut.c56, dut.c57, dut.c67} !==
          {1'(col1 >> 1), 1'(col2 >> 1), 1'(col2 >> 2), 1'(col3 >> 1), 1'(col3 >> 2),
           1'(col4 >> 1), 1'(col4 >> 2), 1'(col5 >> 1), 1'(col5 >> 2), 1'(col6 >> 1)}) begin
        failures++;
        $display("carries: %0d * %0d gave wrong inter-column carries", a, b);
      end

      if (dut.c12) carry_hits[0]++;
      if (dut.c23) carry_hits[1]++;
      if (dut.c24) carry_hits[2]++;
      if (dut.c34) carry_hits[3]++;
      if (dut.c35) carry_hits[4]++;
      if (dut.c45) carry_hits[5]++;
      if (dut.c46) carry_hits[6]++;
      if (dut.c56) carry_hits[7]++;
      if (dut.c57) carry_hits[8]++;
      if (dut.c67) carry_hits[9]++;
    end

    for (int i = 0; i < NC; i++) begin
      $display("carry %s was 1 for %0d of 256 operand pairs", CARRY_NAME[i], carry_hits[i]);
      checks++;
      if (carry_hits[i] == 0) begin
        failures++;
        $display("carry %s never occurred", CARRY_NAME[i]);
      end
    end

    // Part 2: the 20-line map is one-to-one.
    for (int v = 0; v < 2**NL; v++) begin
      {anc, a, b} = NL'(v);
      #1;
      out_vec = {garbage, p};
      checks++;
      if (seen[out_vec]) begin
        failures++;
        if (failures < 10) $display("not one-to-one at input %h", v);
      end
      seen[out_vec] = 1'b1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
