// alu16_pkg: word size and function codes of the 16-bit ("mark 4")
// datapath blocks: alu16, reg16, regmux16, regsel.
package alu16_pkg;
  parameter int WORDSIZE = 16;

  // alu16 FN codes. Bit slice k forms x' = (x & ENABLEX) | CONST1 and
  // y' = y ^ COMPY, then one of these four.
  typedef enum logic [1:0] {
    FN_ADD = 2'b00,   // x' + y' + carry
    FN_OR  = 2'b01,   // x' | y'
    FN_AND = 2'b10,   // x' & y'
    FN_XOR = 2'b11    // x' ^ y'
  } alu16_fn_e;
endpackage
