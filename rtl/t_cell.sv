// t_cell: one bit of the loadable counter, a D flip-flop behind three
// 2-to-1 multiplexers.
//
//   mux 1: y = t ? ~q : q       (toggle when t, else hold)
//   mux 2: I ? y : q            (count enabled or not)
//   mux 3: s ? d : (mux 2)      (parallel load has priority)
//
// With s high the cell loads d; with s low and I high it is a T flip-flop;
// with both low it holds. reset clears q asynchronously.
//
// Interface: t, d, s, I, clk, reset (active high), q (registered). The mux
// structure follows the design; the priority of s over I is read from the
// order of the multiplexers, the reset polarity is this design's choice.
module t_cell (
  input  logic t,
  input  logic d,
  input  logic s,
  input  logic I,
  input  logic clk,
  input  logic reset,
  output logic q
);
  logic y, cnt, nxt;

  always_comb begin
    y   = t ? ~q : q;
    cnt = I ? y : q;
    nxt = s ? d : cnt;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) q <= 1'b0;
    else       q <= nxt;
  end
endmodule
