// shc1_top: the 8-bit simple microcoded CPU ("mark 1").
//
// One 8-bit data bus (PROG) joins the program ROM, the result register and
// the strobed registers: accumulator ACC (S1), memory data register MDR
// (S2), result register (S3), instruction register (S4, in cu1), PC (S5,
// load) and the output port latch (S7). The PC (pc block) drives the 3-bit
// address bus AB of the 8-byte program ROM while PCE (active low) is 0. The
// ALU sees ACC on operand 1 and MDR on operand 2 and takes its function
// from the control word. The control unit (cu1) runs one micro-step per
// clock.
//
// Instructions:
//   0x03 #   ACC = ACC + #
//   0x02     port = ACC
//   0x01 #   jump to #
// Clocks, fetch of the next opcode included: 10 for 0x03, 6 for 0x02 and
// the jump, 3 for the power-up fetch.
//
// Interface (pin names of the design): CLK, RESET (active high,
// asynchronous); CU[11:0] control word, PROG[7:0] data bus, AB[2:0]
// address bus, portaOP[7:0] output port, S[7:0] strobes, all outputs for
// observation. PROG_FILE names the 8-byte program ROM image. The bus is the
// OR of its drivers (see tri8), with an assertion that at most one drives.
// The blocks and microcode follow the design; the ROM written as an array,
// the 8-bit PC with its low 3 bits on AB, and AB reading 0 while PCE is 1
// are this design's choices.
module shc1_top
  import shc1_pkg::*;
#(
  parameter string PROG_FILE = "rtl/shc1_prog.hex"
) (
  input  logic        CLK,
  input  logic        RESET,
  output logic [11:0] CU,
  output logic [7:0]  PROG,
  output logic [2:0]  AB,
  output logic [7:0]  portaOP,
  output logic [7:0]  S
);
  cu1_word_t  w;
  logic [1:0] ir;
  logic [3:0] step;
  logic [7:0] pc_q, rom_q, rom_d, res_d, acc_q, mdr_q, alu_y, dbus;
  logic       rom_drv, res_drv;
  logic [7:0] rom [8];

  initial $readmemh(PROG_FILE, rom);

  cu1 u_cu (.CLK(CLK), .RST(RESET), .d_in(dbus), .CU(CU), .S(S), .ir(ir),
            .step(step));
  always_comb w = cu1_word_t'(CU);

  pc u_pc (.d(dbus), .i(w.pci), .s(S[S1_PCS]), .clk(CLK), .reset(RESET),
           .q(pc_q));

  always_comb begin
    AB    = w.pce_n ? 3'd0 : pc_q[2:0];
    rom_q = rom[AB];
  end
  tri8 u_rom_tri (.E(w.rom_e), .I(rom_q), .d(rom_d), .drv(rom_drv));

  lat8 u_acc  (.CLK(CLK), .reset(RESET), .S(S[S1_ACCS]), .din(dbus), .qout(acc_q));
  lat8 u_mdr  (.CLK(CLK), .reset(RESET), .S(S[S1_MDRS]), .din(dbus), .qout(mdr_q));
  alu  u_alu  (.op1(acc_q), .op2(mdr_q), .alu_fn(w.alu_fn), .result(alu_y));
  reg8 u_res  (.CLK(CLK), .RESET(RESET), .S(S[S1_RESS]), .E(w.rese), .D(alu_y),
               .Q(res_d), .drv(res_drv));
  lat8 u_port (.CLK(CLK), .reset(RESET), .S(S[S1_OUTS]), .din(dbus), .qout(portaOP));

  always_comb begin
    dbus = rom_d | res_d;
    PROG = dbus;
  end

  a_bus_one_driver: assert property (@(posedge CLK) disable iff (RESET)
    !(rom_drv && res_drv));
endmodule
