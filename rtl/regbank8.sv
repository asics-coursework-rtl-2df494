// regbank8: bank of eight 8-bit accumulators (A..H) with one write port
// and two read ports.
//
// SW is decoded 3-to-8 and gated by the strobe S (enablebus8), so on a
// clock edge with S high only the accumulator SW takes the data bus value
// D. SA and SB are decoded to the Enable_A and Enable_B inputs of the
// accumulators: the one chosen by SA drives output A (ALU operand 1), the
// one chosen by SB drives output B (ALU operand 2). Reads are
// combinational; SA and SB may name the same accumulator.
//
// Interface: CLK, RST (active high), S, D[7:0], SW/SA/SB[2:0], A[7:0],
// B[7:0]. Follows the design.
module regbank8 (
  input  logic       CLK,
  input  logic       RST,
  input  logic       S,
  input  logic [7:0] D,
  input  logic [2:0] SW,
  input  logic [2:0] SA,
  input  logic [2:0] SB,
  output logic [7:0] A,
  output logic [7:0] B
);
  logic [7:0]      dec_w, w, ea, eb;
  logic [7:0][7:0] a_k, b_k;

  always_comb begin
    dec_w = 8'b1 << SW;
    ea    = 8'b1 << SA;
    eb    = 8'b1 << SB;
  end

  enablebus8 u_wen (.A(dec_w), .I(S), .F(w));

  for (genvar k = 0; k < 8; k++) begin : g_acc
    acc u_acc (
      .CLK(CLK), .RESET(RST), .S(w[k]), .D(D),
      .Enable_A(ea[k]), .Enable_B(eb[k]), .A(a_k[k]), .B(b_k[k])
    );
  end

  // wired-OR read buses: exactly one accumulator is enabled on each
  always_comb begin
    A = '0;
    B = '0;
    for (int k = 0; k < 8; k++) begin
      A |= a_k[k];
      B |= b_k[k];
    end
  end
endmodule
