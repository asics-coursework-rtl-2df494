// inputoutput: eight 8-bit bidirectional ports, PORTA (0) to PORTH (7).
//
// SEL picks one port through a 3-to-8 decoder. Two enablebus8 gates turn
// the one-hot decoder output into per-port controls: gated by S it strobes
// only the selected port's latch; gated by IO it puts only the selected
// port into input mode while IO is high. Every port that is not selected
// is therefore an output and keeps driving its pins with its latched value.
// E sets the direction between this block and the CPU data bus: with E low
// the bus value is passed in to the ports (a strobe then writes it to the
// selected port); with E high the internal bus, driven by the port in
// input mode, is passed out onto the CPU data bus.
//
// Interface: CLK, RST (active high), SEL[2:0], S, IO, E; d_in (CPU data
// bus), d_out/d_drv (this block's drive onto it); port_in, port_out,
// port_oe (pins of port k at index k). Latches load on the rising edge.
// Structure follows the design; the split of each bidirectional bus into
// in/out/enable is this design's (see tri8).
module inputoutput (
  input  logic            CLK,
  input  logic            RST,
  input  logic [2:0]      SEL,
  input  logic            S,
  input  logic            IO,
  input  logic            E,
  input  logic [7:0]      d_in,
  output logic [7:0]      d_out,
  output logic            d_drv,
  input  logic [7:0][7:0] port_in,
  output logic [7:0][7:0] port_out,
  output logic [7:0]      port_oe
);
  logic [7:0]      dec, strobe, dir_in;
  logic [7:0]      d_to_ports, d_from_ports;
  logic [7:0][7:0] p_dout;
  logic [7:0]      p_drv;

  always_comb dec = 8'b1 << SEL;

  enablebus8 u_strobe (.A(dec), .I(S),  .F(strobe));
  enablebus8 u_dir    (.A(dec), .I(IO), .F(dir_in));

  // CPU bus -> internal bus when E is low
  tri8 u_bus_in (.E(~E), .I(d_in), .d(d_to_ports), .drv());

  for (genvar k = 0; k < 8; k++) begin : g_port
    bidport8 u_port (
      .CLK(CLK), .RESET(RST), .S(strobe[k]), .IO(dir_in[k]),
      .port_in(port_in[k]), .port_out(port_out[k]), .port_oe(port_oe[k]),
      .d_in(d_to_ports), .d_out(p_dout[k]), .d_drv(p_drv[k])
    );
  end

  always_comb begin
    d_from_ports = '0;
    for (int k = 0; k < 8; k++) d_from_ports |= p_dout[k];
  end

  // internal bus -> CPU bus when E is high
  tri8 u_bus_out (.E(E), .I(d_from_ports), .d(d_out), .drv(d_drv));

  // at most one port drives the internal bus
  a_one_driver: assert property (@(posedge CLK) disable iff (RST) $onehot0(p_drv));
endmodule
