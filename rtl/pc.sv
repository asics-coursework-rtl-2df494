// pc: 8-bit program counter, a loadable synchronous up-counter.
//
// Eight t_cell bits. The T input of bit k is the AND of bits 0..k-1, as in
// a synchronous binary counter, so with i high the count steps by one per
// clock; with s high the counter loads d instead (jumps). reset clears it.
//
// Interface: d[7:0] (jump target from the data bus), i (increment), s
// (load, has priority), clk, reset (active high, asynchronous), q[7:0]
// (address, registered). Structure follows the design.
module pc (
  input  logic [7:0] d,
  input  logic       i,
  input  logic       s,
  input  logic       clk,
  input  logic       reset,
  output logic [7:0] q
);
  logic [7:0] t;

  assign t[0] = 1'b1;

  for (genvar k = 0; k < 8; k++) begin : g_bit
    if (k > 0) begin : g_t
      assign t[k] = t[k-1] & q[k-1];
    end
    t_cell u_cell (
      .t(t[k]), .d(d[k]), .s(s), .I(i), .clk(clk), .reset(reset), .q(q[k])
    );
  end
endmodule
