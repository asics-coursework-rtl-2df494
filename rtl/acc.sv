// acc: one 8-bit accumulator with two read ports.
//
// A lat8 holds the value (loaded from D on a clock edge while S is high).
// Two bus drivers put it on the register bank's A bus when Enable_A is high
// and on its B bus when Enable_B is high; both may be on at once, so one
// accumulator can feed both ALU operands.
//
// Interface: CLK, RESET (active high), S, D[7:0], Enable_A, Enable_B,
// A[7:0], B[7:0] (0 when not enabled, see tri8). Follows the design.
module acc (
  input  logic       CLK,
  input  logic       RESET,
  input  logic       S,
  input  logic [7:0] D,
  input  logic       Enable_A,
  input  logic       Enable_B,
  output logic [7:0] A,
  output logic [7:0] B
);
  logic [7:0] q;

  lat8 u_lat (.CLK(CLK), .reset(RESET), .S(S), .din(D), .qout(q));
  tri8 u_a   (.E(Enable_A), .I(q), .d(A), .drv());
  tri8 u_b   (.E(Enable_B), .I(q), .d(B), .drv());
endmodule
