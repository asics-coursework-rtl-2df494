// regmux16: four-to-one multiplexer of 16-bit buses.
//
// Q = R00, R01, R10 or R11 for SEL = 00, 01, 10, 11 (the input names give
// their select code). Combinational.
//
// Interface: R00, R01, R10, R11, Q [WIDTH-1:0]; SEL[1:0].
module regmux16
  import alu16_pkg::*;
#(
  parameter int WIDTH = WORDSIZE
) (
  input  logic [WIDTH-1:0] R00,
  input  logic [WIDTH-1:0] R01,
  input  logic [WIDTH-1:0] R10,
  input  logic [WIDTH-1:0] R11,
  input  logic [1:0]       SEL,
  output logic [WIDTH-1:0] Q
);
  always_comb begin
    unique case (SEL)
      2'b00: Q = R00;
      2'b01: Q = R01;
      2'b10: Q = R10;
      2'b11: Q = R11;
    endcase
  end
endmodule
