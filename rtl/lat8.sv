// lat8: 8-bit strobed register ("latch" in the design's terms).
//
// Eight D flip-flops, each fed by a 2-to-1 multiplexer: when S is high the
// flip-flop takes din on the rising clock edge, when S is low it takes its
// own output back and holds. reset clears it asynchronously.
//
// Interface: CLK, reset (active high), S (load strobe), din[7:0],
// qout[7:0] (registered, valid after the edge). Structure and pin names
// follow the design; the reset polarity is this design's choice.
module lat8 (
  input  logic       CLK,
  input  logic       reset,
  input  logic       S,
  input  logic [7:0] din,
  output logic [7:0] qout
);
  always_ff @(posedge CLK or posedge reset) begin
    if (reset) qout <= '0;
    else       qout <= S ? din : qout;
  end
endmodule
