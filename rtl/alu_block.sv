// alu_block: the arithmetic and logic section of the CPU.
//
// The register bank's two read ports feed the ALU: the accumulator chosen
// by SA is operand 1 and the one chosen by SB is operand 2 (this order
// matters for the non-commutative functions). The ALU output is captured in
// the result register on strobe S3, and the result register drives the data
// bus while RESE is high. Accumulators load from the data bus on strobe
// S1, the one chosen by SW being written. A result therefore reaches an
// accumulator through the bus: S3 (ALU -> RESULT), then RESE (RESULT -> bus)
// with S1 (bus -> accumulator) on a later cycle.
//
// Interface: CLK, RST (active high); d_in[7:0] (data bus value), d_out,
// d_drv (drive onto the bus); SW/SA/SB[2:0]; S1, S3 (strobes); RESE; FN[3:0]
// (ALU function, from the instruction register). Registers load on the
// rising edge; the ALU is combinational. Structure follows the design.
module alu_block (
  input  logic       CLK,
  input  logic       RST,
  input  logic [7:0] d_in,
  output logic [7:0] d_out,
  output logic       d_drv,
  input  logic [2:0] SW,
  input  logic [2:0] SA,
  input  logic [2:0] SB,
  input  logic       S1,
  input  logic       S3,
  input  logic       RESE,
  input  logic [3:0] FN
);
  logic [7:0] op1, op2, alu_out, res_q;

  regbank8 u_bank (
    .CLK(CLK), .RST(RST), .S(S1), .D(d_in),
    .SW(SW), .SA(SA), .SB(SB), .A(op1), .B(op2)
  );

  alu u_alu (.op1(op1), .op2(op2), .alu_fn(FN), .result(alu_out));

  lat8 u_result (.CLK(CLK), .reset(RST), .S(S3), .din(alu_out), .qout(res_q));

  tri8 u_rese (.E(RESE), .I(res_q), .d(d_out), .drv(d_drv));
endmodule
