// bidport8: one 8-bit bidirectional I/O port built around a lat8.
//
// Output mode (IO = 0): the latch takes its value from the data bus D when
// S is high, and its output drives the pins PORT.
// Input mode (IO = 1): the latch takes its value from the pins when S is
// high, and its output drives the data bus D.
// In the schematic four tri-state buffers steer the latch input and output;
// here each bidirectional pin group is split into an input, an output and
// an output enable (port_oe, d_drv), and a disabled output is 0 so that
// it can join a wired-OR bus (see tri8).
//
// Interface: CLK, RESET (active high), S (strobe), IO (direction),
// port_in/port_out/port_oe (pins), d_in (data bus value), d_out/d_drv
// (this port's drive onto the data bus). The latch is loaded on the rising
// clock edge; the direction switches combinationally with IO.
module bidport8 (
  input  logic       CLK,
  input  logic       RESET,
  input  logic       S,
  input  logic       IO,
  input  logic [7:0] port_in,
  output logic [7:0] port_out,
  output logic       port_oe,
  input  logic [7:0] d_in,
  output logic [7:0] d_out,
  output logic       d_drv
);
  logic [7:0] lat_d, lat_q, from_bus, from_pins;

  // steering of the latch input: data bus in output mode, pins in input mode
  tri8 u_in_bus  (.E(~IO), .I(d_in),    .d(from_bus),  .drv());
  tri8 u_in_pins (.E(IO),  .I(port_in), .d(from_pins), .drv());
  always_comb lat_d = from_bus | from_pins;

  lat8 u_lat (.CLK(CLK), .reset(RESET), .S(S), .din(lat_d), .qout(lat_q));

  // steering of the latch output
  tri8 u_out_pins (.E(~IO), .I(lat_q), .d(port_out), .drv(port_oe));
  tri8 u_out_bus  (.E(IO),  .I(lat_q), .d(d_out),    .drv(d_drv));
endmodule
