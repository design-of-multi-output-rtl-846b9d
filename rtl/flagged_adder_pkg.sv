// Shared constants and types of the flagged binary adder.
//
// FA_WIDTH is the operand width of the main configuration, a 16-bit adder.
// The adder itself works for any even width of two or more; the 4-bit and
// 8-bit versions are obtained by overriding the N parameter of each module.
// fa_mode_e names the four results the INCR/COMP control pair selects.
package flagged_adder_pkg;

  localparam int unsigned FA_WIDTH = 16;

  // {COMP, INCR} encodings and the result each selects for A+B
  // (with B complemented ahead of the adder the same codes give
  // A-B-1, A-B, B-A and B-A-1).
  typedef enum logic [1:0] {
    FA_SUM      = 2'b00,  // A+B
    FA_SUM_INC  = 2'b01,  // A+B+1
    FA_NEG_INC  = 2'b10,  // -(A+B+1), the bitwise complement of A+B
    FA_NEG_INC2 = 2'b11   // -(A+B+2), the bitwise complement of A+B+1
  } fa_mode_e;

endpackage
