// alu: 8-bit arithmetic and logic unit, 14 functions, combinational.
//
// alu_fn selects the result (all arithmetic modulo 256):
//   0 op1          4 op1 & op2     8 op1 + op2       C op1 - 1
//   1 op2          5 op1 | op2     9 op1 + op2 + 1   D op2 - 1
//   2 ~op1         6 op1 ^ op2     A op1 - op2
//   3 ~op2         7 op1 + 1       B op2 - op1
// The two unused codes, E and F, pass op1. In the CPU alu_fn comes straight
// from the upper nibble of the opcode byte, so one micro-program serves
// every function.
//
// Interface: op1[7:0], op2[7:0], alu_fn[3:0], result[7:0]. The function
// table follows the design.
module alu
  import shc_pkg::*;
(
  input  logic [7:0] op1,
  input  logic [7:0] op2,
  input  logic [3:0] alu_fn,
  output logic [7:0] result
);
  always_comb begin
    case (alu_fn_e'(alu_fn))
      ALU_OP1:     result = op1;
      ALU_OP2:     result = op2;
      ALU_NOT_OP1: result = ~op1;
      ALU_NOT_OP2: result = ~op2;
      ALU_AND:     result = op1 & op2;
      ALU_OR:      result = op1 | op2;
      ALU_XOR:     result = op1 ^ op2;
      ALU_INC_OP1: result = op1 + 8'd1;
      ALU_ADD:     result = op1 + op2;
      ALU_ADD_INC: result = op1 + op2 + 8'd1;
      ALU_SUB:     result = op1 - op2;
      ALU_RSUB:    result = op2 - op1;
      ALU_DEC_OP1: result = op1 - 8'd1;
      ALU_DEC_OP2: result = op2 - 8'd1;
      default:     result = op1;
    endcase
  end
endmodule
