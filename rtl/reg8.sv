// reg8: 8-bit register with a bus driver (lat8 followed by tri8).
//
// The register loads D on a rising clock edge while S is high. While E is
// high its value is driven onto the bus output Q and drv is 1; otherwise Q
// is 0 (this design's stand-in for high impedance, see tri8). The single-
// accumulator CPU uses it as the result register. The structure follows
// the design; the wired-OR bus convention is this design's choice.
//
// Interface: CLK, RESET (active high, asynchronous), S, E, D[7:0],
// Q[7:0], drv. Timing: one clock from S to the register; Q follows E and
// the register without delay.
module reg8 (
  input  logic       CLK,
  input  logic       RESET,
  input  logic       S,
  input  logic       E,
  input  logic [7:0] D,
  output logic [7:0] Q,
  output logic       drv
);
  logic [7:0] q;

  lat8 u_lat (.CLK(CLK), .reset(RESET), .S(S), .din(D), .qout(q));
  tri8 u_drv (.E(E), .I(q), .d(Q), .drv(drv));
endmodule
