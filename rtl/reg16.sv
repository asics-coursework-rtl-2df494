// reg16: 16-bit register with load enable.
//
// On a rising clock edge the register takes D when load is high and holds
// otherwise. As in the design it has no reset: its contents are undefined
// until the first load.
//
// Interface: D[WIDTH-1:0], clock, load, Q[WIDTH-1:0] (registered).
module reg16
  import alu16_pkg::*;
#(
  parameter int WIDTH = WORDSIZE
) (
  input  logic [WIDTH-1:0] D,
  input  logic             clock,
  input  logic             load,
  output logic [WIDTH-1:0] Q
);
  always_ff @(posedge clock) begin
    if (load) Q <= D;
  end
endmodule
