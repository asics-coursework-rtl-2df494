// shc2_top: the 8-bit single-accumulator microcoded CPU ("mark 2").
//
// One 8-bit data bus joins the program ROM/RAM (memory block), the result
// register and the strobed registers: accumulator ACC (S1), memory data
// register MDR (S2), result register (S3), instruction register (S4),
// PC (S5, load), MAR (S6) and the output port latch (S7). The ALU always
// sees ACC on operand 1 and MDR on operand 2, and takes its function from
// the opcode's upper nibble. The control unit (cu2) runs one micro-step
// per clock from a 16-bit control word.
//
// Instructions (F = ALU function):
//   0xF3 #   ACC = ACC <F> #   (LDA # is 0x13, ADDA # 0x83, SUBA # 0xA3)
//   0xF2     port = ACC <F> MDR (OUTA is 0x02)
//   0x01 #   jump to #
// Clocks, fetch of the next opcode included: 10 for 0xF3, 6 for 0xF2 and
// the jump, 3 for the power-up fetch and the unused opcodes.
//
// Interface (pin names of the design): CLK, RESET (active high,
// asynchronous); d[7:0] data bus, ab[7:0] address bus, portaOP[7:0] output
// port, S[7:0] strobes, all outputs for observation. PROG_FILE names the
// program ROM image. The bus is the OR of its drivers (see tri8), with an
// assertion that at most one drives. The block structure and microcode
// follow the design; the use of the shared memory block (256-byte ROM and
// RAM) and the no-operation for unused opcodes are this design's choices.
module shc2_top
  import shc2_pkg::*;
#(
  parameter string PROG_FILE = "rtl/shc2_prog.hex"
) (
  input  logic       CLK,
  input  logic       RESET,
  output logic [7:0] d,
  output logic [7:0] ab,
  output logic [7:0] portaOP,
  output logic [7:0] S
);
  logic [15:0] cu_w;
  cu2_word_t   w;
  logic [3:0]  fn, step;
  logic [7:0]  ir, dbus, mem_d, res_d, acc_q, mdr_q, alu_y;
  logic        mem_drv, res_drv;

  cu2 u_cu (
    .CLK(CLK), .RST(RESET), .d_in(dbus), .CU(cu_w), .S(S), .FN(fn),
    .ir(ir), .step(step)
  );
  always_comb w = cu2_word_t'(cu_w);

  memory #(.PROG_FILE(PROG_FILE)) u_memory (
    .CLK(CLK), .RST(RESET), .d_in(dbus), .d_out(mem_d), .d_drv(mem_drv),
    .CU(cu_w[9:5]), .S5(S[S2_PCS]), .S6(S[S2_MARS]), .address(ab)
  );

  lat8 u_acc  (.CLK(CLK), .reset(RESET), .S(S[S2_ACCS]), .din(dbus), .qout(acc_q));
  lat8 u_mdr  (.CLK(CLK), .reset(RESET), .S(S[S2_MDRS]), .din(dbus), .qout(mdr_q));
  alu  u_alu  (.op1(acc_q), .op2(mdr_q), .alu_fn(fn), .result(alu_y));
  reg8 u_res  (.CLK(CLK), .RESET(RESET), .S(S[S2_RESS]), .E(w.rese), .D(alu_y),
               .Q(res_d), .drv(res_drv));
  lat8 u_port (.CLK(CLK), .reset(RESET), .S(S[S2_OUTS]), .din(dbus), .qout(portaOP));

  always_comb begin
    dbus = mem_d | res_d;
    d    = dbus;
  end

  a_bus_one_driver: assert property (@(posedge CLK) disable iff (RESET)
    !(mem_drv && res_drv));
endmodule
