// shc3_top: the 8-bit microcoded CPU ("mark 3").
//
// Four units share one 8-bit data bus and one 8-bit address bus, in the
// von Neumann arrangement:
//   cu           instruction register, micro-step counter, microcode ROMs;
//                issues the 24-bit control word CU, strobes S and the ALU
//                function FN (the opcode's upper nibble)
//   memory       PC, MAR, 256-byte program ROM, 256-byte RAM (CU[9:5], S5, S6)
//   alu_block    eight accumulators A..H, ALU, result register
//                (CU[23:15] selects, CU[4] RESE, S1, S3, FN)
//   inputoutput  eight bidirectional ports A..H (CU[14:12] select,
//                CU[11] PortE, CU[10] Port_IO, S7)
// Each unit reports the value it drives and whether it drives; the data
// bus is the OR of the drives (see tri8), and an assertion checks that no
// two units drive it in the same cycle. An undriven bus reads 0.
//
// Instructions are one opcode byte, or two for immediates and jumps:
//   0xF3 #  (F = ALU function): A = A <F> #, via accumulator H
//   0xF4/0xF5/0xF6 #: the same for B, C, D
//   0xF2, 0xF7, 0xF8, 0xF9: port A/B/C/D = A/B/C/D <F> H
//   0xFA, 0xFB, 0xFC: port A = B/C/D <F> H
//   0x0D: A = port A pins          0x01 #: jump to #
// Cycles per instruction, fetch of the next opcode included: 10 for an
// immediate, 6 for out, in and jump. After reset the CPU spends 3 cycles
// fetching the opcode at address 0.
//
// Interface: CLK, RST (active high, asynchronous); ADDRESS[7:0] (address
// bus); for port k (0 = A ... 7 = H): port_in[k] (pins as read),
// port_out[k] (value driven), port_oe[k] (the port is an output; every port
// that is not being read is one). PROG_FILE names the hex image loaded into
// the program ROM.
module shc3_top #(
  parameter string PROG_FILE = "rtl/shc3_prog.hex"
) (
  input  logic            CLK,
  input  logic            RST,
  output logic [7:0]      ADDRESS,
  input  logic [7:0][7:0] port_in,
  output logic [7:0][7:0] port_out,
  output logic [7:0]      port_oe
);
  import shc_pkg::*;

  logic [23:0] cu_w;
  logic [7:0]  s;
  logic [3:0]  fn;
  logic [7:0]  ir;
  logic [3:0]  step;
  cu_word_t    w;

  logic [7:0]  dbus;
  logic [7:0]  mem_d, alu_d, io_d;
  logic        mem_drv, alu_drv, io_drv;

  always_comb w = cu_word_t'(cu_w);

  cu u_cu (
    .CLK(CLK), .RST(RST), .d_in(dbus),
    .CU(cu_w), .S(s), .FN(fn), .ir(ir), .step(step)
  );

  memory #(.PROG_FILE(PROG_FILE)) u_memory (
    .CLK(CLK), .RST(RST), .d_in(dbus), .d_out(mem_d), .d_drv(mem_drv),
    .CU(cu_w[9:5]), .S5(s[S_PCS]), .S6(s[S_MARS]), .address(ADDRESS)
  );

  alu_block u_alu (
    .CLK(CLK), .RST(RST), .d_in(dbus), .d_out(alu_d), .d_drv(alu_drv),
    .SW(w.sw), .SA(w.sa), .SB(w.sb),
    .S1(s[S_RBS]), .S3(s[S_RESS]), .RESE(w.rese), .FN(fn)
  );

  inputoutput u_io (
    .CLK(CLK), .RST(RST), .SEL(w.port_sel), .S(s[S_OUTS]),
    .IO(w.port_io), .E(w.port_e),
    .d_in(dbus), .d_out(io_d), .d_drv(io_drv),
    .port_in(port_in), .port_out(port_out), .port_oe(port_oe)
  );

  always_comb dbus = mem_d | alu_d | io_d;

  // one driver at most on the shared data bus
  a_bus_one_driver: assert property (@(posedge CLK) disable iff (RST)
                                     $onehot0({mem_drv, alu_drv, io_drv}));
endmodule
