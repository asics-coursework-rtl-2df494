// upc: 4-bit synchronous micro-step counter.
//
// Four toggle flip-flops share one clock. Bit k toggles only when all the
// bits below it are 1, so every bit changes on the same edge and the count
// runs 0..15 and wraps to 0. CLR clears the count on the next clock edge
// (the control unit raises it on the last step of a micro-program); RESET
// clears it at once.
//
// Interface: CLK, CLR (synchronous clear), RESET (asynchronous, active
// high), Q[3:0]. The toggle-chain structure and the pin names follow the
// design; making CLR synchronous and RESET active high are this design's
// choices.
module upc (
  input  logic       CLK,
  input  logic       CLR,
  input  logic       RESET,
  output logic [3:0] Q
);
  logic [3:0] t;

  // toggle enables: T0 = 1, Tk = Q0 & ... & Q(k-1)
  always_comb t = {&Q[2:0], &Q[1:0], Q[0], 1'b1};

  always_ff @(posedge CLK or posedge RESET) begin
    if (RESET)    Q <= '0;
    else if (CLR) Q <= '0;
    else          Q <= Q ^ t;
  end
endmodule
