// cu2: control unit of the single-accumulator CPU.
//
// The instruction register (lat8, strobe S4) holds the opcode. Its lower
// nibble and the micro-step counter (upc) address two microcode ROM slices
// that together give the 16-bit control word; its upper nibble goes
// straight to the ALU as FN. SEL S (bits 3:1) is decoded into the one-hot
// strobes S[7:1] (S[0] is never set). UPCCL clears the micro-step counter
// at the next clock edge, so the next step is step 0 of the newly loaded
// opcode. After reset IR and the counter are 0, which runs the power-up
// fetch. This follows the design; the strobe decoder is written as a shift.
//
// Interface: CLK, RST (active high), d_in (data bus), CU[15:0], S[7:0],
// FN[3:0], ir[7:0], step[3:0]. One micro-step per clock.
module cu2
  import shc2_pkg::*;
(
  input  logic        CLK,
  input  logic        RST,
  input  logic [7:0]  d_in,
  output logic [15:0] CU,
  output logic [7:0]  S,
  output logic [3:0]  FN,
  output logic [7:0]  ir,
  output logic [3:0]  step
);
  logic [7:0] uaddr;
  cu2_word_t  w;

  lat8 u_ir (.CLK(CLK), .reset(RST), .S(S[S2_IRS]), .din(d_in), .qout(ir));
  upc  u_upc (.CLK(CLK), .CLR(w.upccl), .RESET(RST), .Q(step));

  always_comb uaddr = {ir[3:0], step};

  for (genvar k = 0; k < 2; k++) begin : g_rom
    ucode2_rom #(.SLICE(k)) u_rom (.addr(uaddr), .q(CU[8*k +: 8]));
  end

  always_comb begin
    w    = cu2_word_t'(CU);
    S    = 8'b1 << w.sel_s;
    S[0] = 1'b0;
    FN   = ir[7:4];
  end
endmodule
