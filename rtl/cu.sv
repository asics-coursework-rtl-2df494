// cu: microprogrammed control unit.
//
// The instruction register (a lat8 loaded from the data bus on strobe S4)
// splits the opcode byte: its lower nibble selects one of 16
// micro-programs, its upper nibble goes straight to the ALU as the
// function code, so e.g. 0x83 (ADD) and 0xA3 (SUB) share one
// micro-program. The micro-step counter (upc) counts the steps of the
// current micro-program and is cleared by UPCCL on the last step, when the
// next opcode is strobed into the instruction register. {IR[3:0], step}
// addresses three 8-bit microcode ROMs that together give the 24-bit
// control word CU[23:0]; its 3-bit SEL S field is decoded into the one-hot
// strobes S[7:0] (S0 and S2 are never used).
//
// One micro-step per clock: the control word is a combinational function
// of the IR and the step count, and every strobe it raises takes effect on
// the next rising edge. After reset IR = 0 and the step is 0, which is the
// fetch-only micro-program, so the CPU starts by fetching the opcode at
// address 0.
//
// Interface: CLK, RST (active high), d_in[7:0] (data bus value),
// CU[23:0], S[7:0], FN[3:0]; ir and step are brought out for observation.
module cu
  import shc_pkg::*;
(
  input  logic        CLK,
  input  logic        RST,
  input  logic [7:0]  d_in,
  output logic [23:0] CU,
  output logic [7:0]  S,
  output logic [3:0]  FN,
  output logic [7:0]  ir,
  output logic [3:0]  step
);
  logic [7:0] uaddr;
  cu_word_t   w;

  lat8 u_ir (.CLK(CLK), .reset(RST), .S(S[S_IRS]), .din(d_in), .qout(ir));

  upc u_upc (.CLK(CLK), .CLR(w.upccl), .RESET(RST), .Q(step));

  always_comb uaddr = {ir[3:0], step};

  for (genvar k = 0; k < 3; k++) begin : g_rom
    ucode_rom #(.SLICE(k)) u_rom (.addr(uaddr), .q(CU[8*k +: 8]));
  end

  always_comb begin
    w  = cu_word_t'(CU);
    S  = 8'b1 << w.sel_s;
    S[0] = 1'b0;                 // SEL S = 000: no strobe
    FN = ir[7:4];
  end
endmodule
