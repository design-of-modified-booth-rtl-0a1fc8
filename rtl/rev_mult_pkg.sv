// rev_mult_pkg: shared types and constants of the 4x4 column-wise reversible
// multiplier.
//
// The multiplier is one reversible circuit of 20 lines: 8 operand lines
// (a3..a0, b3..b0) and 12 ancilla lines enter, 8 product lines (S7..S0) and
// 12 garbage lines leave. The two structs below name the ancilla and garbage
// lines after the signal each one carries inside the circuit, so a caller
// can see which column consumes or releases it. The line counts (12 ancilla,
// 12 garbage) are the published figures for this architecture; the field
// order inside the structs belongs to this implementation.
package rev_mult_pkg;

  // Operand width. The architecture is drawn for 4-bit operands only: each
  // column block is specific to its column, so this is not a free parameter.
  localparam int unsigned N         = 4;
  localparam int unsigned N_ANCILLA = 12;
  localparam int unsigned N_GARBAGE = 12;

  // Ancilla lines, each named after the signal it becomes. All are 0 when the
  // circuit is used as a multiplier.
  typedef struct packed {
    logic c67;  // column 6
    logic c57;  // column 5
    logic c56;  // column 5
    logic c46;  // column 4
    logic c45;  // column 4
    logic c35;  // column 3
    logic c34;  // column 3
    logic c24;  // column 2
    logic c23;  // column 2
    logic c12;  // column 1
    logic s1;   // column 1
    logic s0;   // column 0
  } ancilla_t;

  // Garbage lines, each named after the signal left on it. With ancillas at 0
  // the operand lines leave unchanged and each carry line keeps its carry.
  typedef struct packed {
    logic c57;  // released by column 7
    logic c46;  // released by column 6
    logic a3;   // released by column 6
    logic b3;   // released by column 6
    logic c35;  // released by column 5
    logic a2;   // released by column 5
    logic b2;   // released by column 5
    logic c24;  // released by column 4
    logic a1;   // released by column 4
    logic b1;   // released by column 4
    logic a0;   // released by column 3
    logic b0;   // released by column 3
  } garbage_t;

endpackage
