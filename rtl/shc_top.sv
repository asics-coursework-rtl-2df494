// shc_top: the CPU family side by side.
//
//  * the 8-bit microcoded CPU with eight accumulators and eight ports
//    (shc3_top): clock, reset, address bus and the ports;
//  * its single-accumulator predecessor (shc2_top), with its observation
//    pins (data bus, address bus, output port, strobes) under the m2_
//    prefix;
//  * the first, simple CPU (shc1_top), with its observation pins (control
//    word, data bus, address bus, output port, strobes) under the m1_
//    prefix;
//  * the finished blocks of the 16-bit successor: the four-register bank
//    regsel and the flagged ALU alu16. That CPU was never completed, and no
//    connection between these two blocks is defined, so each keeps its own
//    ports here (m4_ prefix).
// The designs share only clock and reset (the 16-bit register bank is
// clocked by CLK and has no reset). Putting them in one top is this
// design's choice; each part follows its own description.
//
// Interface: see shc3_top, shc2_top, shc1_top, regsel and alu16.
// PROG_FILE, PROG2_FILE and PROG1_FILE are the program ROM images of the
// three CPUs.
module shc_top
  import alu16_pkg::*;
#(
  parameter string PROG_FILE  = "rtl/shc3_prog.hex",
  parameter string PROG2_FILE = "rtl/shc2_prog.hex",
  parameter string PROG1_FILE = "rtl/shc1_prog.hex"
) (
  input  logic                CLK,
  input  logic                RST,
  // 8-bit CPU
  output logic [7:0]          ADDRESS,
  input  logic [7:0][7:0]     port_in,
  output logic [7:0][7:0]     port_out,
  output logic [7:0]          port_oe,
  // 8-bit single-accumulator CPU (observation outputs)
  output logic [7:0]          m2_d,
  output logic [7:0]          m2_ab,
  output logic [7:0]          m2_portaOP,
  output logic [7:0]          m2_S,
  // 8-bit simple CPU (observation outputs)
  output logic [11:0]         m1_CU,
  output logic [7:0]          m1_PROG,
  output logic [2:0]          m1_AB,
  output logic [7:0]          m1_portaOP,
  output logic [7:0]          m1_S,
  // 16-bit register bank
  input  logic [WORDSIZE-1:0] m4_d,
  input  logic [3:0]          m4_ld,
  input  logic [1:0]          m4_selx,
  input  logic [1:0]          m4_sely,
  output logic [WORDSIZE-1:0] m4_regx,
  output logic [WORDSIZE-1:0] m4_regy,
  // 16-bit ALU
  input  logic [WORDSIZE-1:0] m4_x,
  input  logic [WORDSIZE-1:0] m4_y,
  input  logic                m4_cin,
  input  logic                m4_const1,
  input  logic                m4_enablex,
  input  logic                m4_compy,
  input  logic [1:0]          m4_fn,
  output logic [WORDSIZE-1:0] m4_aluout,
  output logic                m4_cout,
  output logic                m4_zflag,
  output logic                m4_nflag,
  output logic                m4_ovflag
);
  shc3_top #(.PROG_FILE(PROG_FILE)) u_cpu (
    .CLK(CLK), .RST(RST), .ADDRESS(ADDRESS),
    .port_in(port_in), .port_out(port_out), .port_oe(port_oe)
  );

  shc2_top #(.PROG_FILE(PROG2_FILE)) u_cpu2 (
    .CLK(CLK), .RESET(RST), .d(m2_d), .ab(m2_ab), .portaOP(m2_portaOP), .S(m2_S)
  );

  shc1_top #(.PROG_FILE(PROG1_FILE)) u_cpu1 (
    .CLK(CLK), .RESET(RST), .CU(m1_CU), .PROG(m1_PROG), .AB(m1_AB),
    .portaOP(m1_portaOP), .S(m1_S)
  );

  regsel u_regsel (
    .D(m4_d), .LD(m4_ld), .SELX(m4_selx), .SELY(m4_sely), .CLOCK(CLK),
    .REGX(m4_regx), .REGY(m4_regy)
  );

  alu16 u_alu16 (
    .X(m4_x), .Y(m4_y), .CIN(m4_cin), .CONST1(m4_const1),
    .ENABLEX(m4_enablex), .COMPY(m4_compy), .FN(m4_fn),
    .ALUOUT(m4_aluout), .COUT(m4_cout), .ZFLAG(m4_zflag),
    .NFLAG(m4_nflag), .OVFLAG(m4_ovflag)
  );
endmodule
