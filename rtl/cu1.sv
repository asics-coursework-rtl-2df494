// cu1: control unit of the simple CPU ("mark 1").
//
// The instruction register (lat8, strobe S4) holds the opcode byte; only
// its two low bits are used, so there are three instructions besides the
// power-up fetch. {IR[1:0], micro-step} addresses the 64 x 12 microcode
// store, which gives the whole control word, ALU function included. SEL S
// (bits 3:1) is decoded into the one-hot strobes S[7:1] (S[0] is never
// set). UPCCL clears the micro-step counter (upc) at the next clock edge.
// After reset IR and the counter are 0, which runs the power-up fetch.
// This follows the design; the store is an array filled at elaboration
// from shc1_pkg::ucode1_word, and the strobe decoder is written as a shift.
//
// Interface: CLK, RST (active high), d_in (data bus), CU[11:0], S[7:0],
// ir[1:0], step[3:0]. One micro-step per clock.
module cu1
  import shc1_pkg::*;
(
  input  logic        CLK,
  input  logic        RST,
  input  logic [7:0]  d_in,
  output logic [11:0] CU,
  output logic [7:0]  S,
  output logic [1:0]  ir,
  output logic [3:0]  step
);
  function automatic logic [63:0][11:0] build();
    logic [63:0][11:0] m;
    for (int a = 0; a < 64; a++) m[a] = ucode1_word(6'(a));
    return m;
  endfunction

  localparam logic [63:0][11:0] UROM = build();

  logic [7:0] ir_q;
  cu1_word_t  w;

  lat8 u_ir (.CLK(CLK), .reset(RST), .S(S[S1_IRS]), .din(d_in), .qout(ir_q));
  upc  u_upc (.CLK(CLK), .CLR(w.upccl), .RESET(RST), .Q(step));

  always_comb begin
    ir   = ir_q[1:0];
    CU   = UROM[{ir, step}];
    w    = cu1_word_t'(CU);
    S    = 8'b1 << w.sel_s;
    S[0] = 1'b0;
  end
endmodule
