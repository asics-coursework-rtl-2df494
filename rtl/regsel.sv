// regsel: four 16-bit accumulators with two read ports.
//
// Four reg16 registers share the input D; LD[k] loads register k on the
// rising clock edge. All four outputs feed two regmux16 multiplexers:
// SELX chooses the register shown on REGX and SELY the one on REGY, so two
// registers (or the same one twice) can be read at once, e.g. as the X and
// Y operands of alu16.
//
// Interface: D[WIDTH-1:0], LD[3:0], SELX[1:0], SELY[1:0], CLOCK,
// REGX/REGY[WIDTH-1:0]. No reset (see reg16). Follows the design.
module regsel
  import alu16_pkg::*;
#(
  parameter int WIDTH = WORDSIZE
) (
  input  logic [WIDTH-1:0] D,
  input  logic [3:0]       LD,
  input  logic [1:0]       SELX,
  input  logic [1:0]       SELY,
  input  logic             CLOCK,
  output logic [WIDTH-1:0] REGX,
  output logic [WIDTH-1:0] REGY
);
  logic [3:0][WIDTH-1:0] r;

  for (genvar k = 0; k < 4; k++) begin : g_reg
    reg16 #(.WIDTH(WIDTH)) u_reg (.D(D), .clock(CLOCK), .load(LD[k]), .Q(r[k]));
  end

  regmux16 #(.WIDTH(WIDTH)) u_mux_x (
    .R00(r[0]), .R01(r[1]), .R10(r[2]), .R11(r[3]), .SEL(SELX), .Q(REGX)
  );
  regmux16 #(.WIDTH(WIDTH)) u_mux_y (
    .R00(r[0]), .R01(r[1]), .R10(r[2]), .R11(r[3]), .SEL(SELY), .Q(REGY)
  );
endmodule
