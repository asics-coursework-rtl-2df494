// tb_shc_top: end-to-end test of the top level.
//
// 8-bit CPU: runs tb/shc3_all.hex (every micro-program, every ALU
// function) against the instruction-level model in shc3_model_pkg,
// comparing address bus, accumulators and ports at every instruction
// boundary, which also checks each instruction's cycle count. It counts
// immediates, OUTs, INs, jumps and no-ops, cycles in which each unit drives
// the data bus, and cycles in which port A is an input.
// 16-bit blocks: loads the four registers of regsel with the values of the
// design's own register-bank test, reads them back on both ports, feeds
// pairs of them to alu16 with the design's ALU test vectors (X = 35425,
// Y = 2144, with and without CIN and CONST1, and Y = 0) and then with
// random operands and flag settings, compared with an arithmetic model.
// It counts carry, zero, negative and overflow flags, subtraction (COMPY)
// and a disabled X, and fails if any never happened.
// Single-accumulator CPU: runs its built-in program and checks the first 20
// values on its output port with the clock at which each appears, and that
// every strobe its microcode uses (all but the MAR's) fires.
// Simple CPU: runs its built-in program and checks its first 20 output
// values (1, 2, 3, ...) with the clock of each, and its strobes likewise.
// The published test values come from the design's own tests; the random
// stimulus, the reference model and the run lengths are this bench's choice.
module tb_shc_top;
  import shc3_model_pkg::*;
  import alu16_pkg::*;

  localparam string PROG    = "tb/shc3_all.hex";
  localparam int    N_INSTR = 300;
  localparam int    N_RAND  = 2000;

  logic            clk = 1'b0, rst = 1'b1;
  logic [7:0]      address;
  logic [7:0][7:0] port_in, port_out;
  logic [7:0]      port_oe;

  logic [7:0]  m2_d, m2_ab, m2_portaOP, m2_S;
  logic [11:0] m1_CU;
  logic [7:0]  m1_PROG, m1_portaOP, m1_S;
  logic [2:0]  m1_AB;
  logic [15:0] m4_d, m4_regx, m4_regy, m4_x, m4_y, m4_aluout;
  logic [3:0]  m4_ld;
  logic [1:0]  m4_selx, m4_sely, m4_fn;
  logic        m4_cin, m4_const1, m4_enablex, m4_compy;
  logic        m4_cout, m4_zflag, m4_nflag, m4_ovflag;

  int checks = 0, failures = 0;
  logic cpu_done = 1'b0, m4_done = 1'b0;

  shc_top #(.PROG_FILE(PROG)) dut (
    .CLK(clk), .RST(rst), .ADDRESS(address),
    .port_in(port_in), .port_out(port_out), .port_oe(port_oe),
    .m2_d(m2_d), .m2_ab(m2_ab), .m2_portaOP(m2_portaOP), .m2_S(m2_S),
    .m1_CU(m1_CU), .m1_PROG(m1_PROG), .m1_AB(m1_AB), .m1_portaOP(m1_portaOP), .m1_S(m1_S),
    .m4_d(m4_d), .m4_ld(m4_ld), .m4_selx(m4_selx), .m4_sely(m4_sely),
    .m4_regx(m4_regx), .m4_regy(m4_regy),
    .m4_x(m4_x), .m4_y(m4_y), .m4_cin(m4_cin), .m4_const1(m4_const1),
    .m4_enablex(m4_enablex), .m4_compy(m4_compy), .m4_fn(m4_fn),
    .m4_aluout(m4_aluout), .m4_cout(m4_cout), .m4_zflag(m4_zflag),
    .m4_nflag(m4_nflag), .m4_ovflag(m4_ovflag)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (N_INSTR * 10 + N_RAND + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 8-bit CPU ----------------
  logic [7:0] dacc [8];
  always_comb begin
    dacc[0] = dut.u_cpu.u_alu.u_bank.g_acc[0].u_acc.u_lat.qout;
    dacc[1] = dut.u_cpu.u_alu.u_bank.g_acc[1].u_acc.u_lat.qout;
    dacc[2] = dut.u_cpu.u_alu.u_bank.g_acc[2].u_acc.u_lat.qout;
    dacc[3] = dut.u_cpu.u_alu.u_bank.g_acc[3].u_acc.u_lat.qout;
    dacc[4] = dut.u_cpu.u_alu.u_bank.g_acc[4].u_acc.u_lat.qout;
    dacc[5] = dut.u_cpu.u_alu.u_bank.g_acc[5].u_acc.u_lat.qout;
    dacc[6] = dut.u_cpu.u_alu.u_bank.g_acc[6].u_acc.u_lat.qout;
    dacc[7] = dut.u_cpu.u_alu.u_bank.g_acc[7].u_acc.u_lat.qout;
  end

  shc3_model  m;
  logic [7:0] image [256];
  int         n_in_mode = 0, n_drv_mem = 0, n_drv_alu = 0, n_drv_io = 0;

  always @(posedge clk) if (!rst) begin
    if (!port_oe[0])          n_in_mode++;
    if (dut.u_cpu.mem_drv)    n_drv_mem++;
    if (dut.u_cpu.alu_drv)    n_drv_alu++;
    if (dut.u_cpu.io_drv)     n_drv_io++;
  end

  // ---------------- single-accumulator CPU, built-in program ----------------
  localparam int N2 = 20;
  int         n2_strobe [8];
  int         n2_chg = 0;
  int         t2_chg [N2];
  logic [7:0] v2_chg [N2];
  logic [7:0] m2_prev = 8'h00;
  int         cyc2 = 0;
  initial for (int k = 0; k < 8; k++) n2_strobe[k] = 0;
  always @(posedge clk) if (!rst) begin
    cyc2 <= cyc2 + 1;
    for (int k = 0; k < 8; k++) if (m2_S[k]) n2_strobe[k]++;
  end
  always @(negedge clk) if (!rst) begin
    if (m2_portaOP != m2_prev && n2_chg < N2) begin
      t2_chg[n2_chg] = cyc2; v2_chg[n2_chg] = m2_portaOP; n2_chg++;
    end
    m2_prev = m2_portaOP;
  end

  // ---------------- simple CPU, built-in program ----------------
  localparam int N1 = 20;
  int         n1_strobe [8];
  int         n1_chg = 0;
  int         t1_chg [N1];
  logic [7:0] v1_chg [N1];
  logic [7:0] m1_prev = 8'h00;
  initial for (int k = 0; k < 8; k++) n1_strobe[k] = 0;
  always @(posedge clk) if (!rst) for (int k = 0; k < 8; k++) if (m1_S[k]) n1_strobe[k]++;
  always @(negedge clk) if (!rst) begin
    if (m1_portaOP != m1_prev && n1_chg < N1) begin
      t1_chg[n1_chg] = cyc2; v1_chg[n1_chg] = m1_portaOP; n1_chg++;
    end
    m1_prev = m1_portaOP;
  end

  // 1, 2, 3, ...: first after 3 + 10 + 3 clocks, then one loop (22) apart
  task automatic check_m1();
    checks++;
    if (n1_chg != N1) begin failures++; $display("FAIL m1 port changed %0d times", n1_chg); end
    for (int i = 0; i < n1_chg; i++) begin
      checks += 2;
      if (v1_chg[i] !== 8'(i + 1) || t1_chg[i] != 16 + 22 * i) begin
        failures++;
        $display("FAIL m1 change %0d: %0d at clock %0d, expected %0d at %0d", i, v1_chg[i], t1_chg[i], 8'(i + 1), 16 + 22 * i);
      end
    end
    for (int k = 1; k < 8; k++)
      if (k != 6) begin
        checks++;
        if (n1_strobe[k] == 0) begin failures++; $display("FAIL simple CPU strobe S%0d never fired", k); end
      end
  endtask

  // 80, 85, 95, 90, then +10 / -5; 16 clocks apart, 28 across the jump
  task automatic check_m2();
    logic [7:0] ev;
    int         et;
    checks++;
    if (n2_chg != N2) begin failures++; $display("FAIL m2 port changed %0d times", n2_chg); end
    ev = 8'd80; et = 16;
    for (int i = 0; i < n2_chg; i++) begin
      if (i > 0) begin
        case (i)
          1: ev = ev ^ 8'd5;
          2: ev = ev + 8'd10;
          3: ev = ev - 8'd5;
          default: ev = (i % 2 == 0) ? ev + 8'd10 : ev - 8'd5;
        endcase
        et = et + ((i >= 4 && i % 2 == 0) ? 28 : 16);
      end
      checks += 2;
      if (v2_chg[i] !== ev || t2_chg[i] != et) begin
        failures++;
        $display("FAIL m2 change %0d: %0d at clock %0d, expected %0d at %0d", i, v2_chg[i], t2_chg[i], ev, et);
      end
    end
  endtask

  task automatic check8(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at pc %02h ir %02h: got %02h expected %02h",
                 what, m.pc, m.ir, got, exp);
    end
  endtask

  task automatic compare_cpu();
    check8("address", address, m.pc);
    for (int k = 0; k < 8; k++) check8($sformatf("acc%0d", k), dacc[k], m.acc[k]);
    for (int k = 0; k < 8; k++)
      check8($sformatf("port%0d", k), port_out[k],
             (k == 0 && m.ir == 8'h0D) ? 8'h00 : m.port[k]);
    check8("port_oe", port_oe, (m.ir == 8'h0D) ? 8'hFE : 8'hFF);
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL never happened: %s", what); end
  endtask

  initial begin
    int   cyc;
    logic was_in;
    m = new();
    $readmemh(PROG, image);
    m.rom = image;
    port_in = '0;
    port_in[0] = 8'hA5;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    cyc = m.reset_fetch();
    repeat (cyc) @(posedge clk);
    #1 compare_cpu();
    for (int i = 0; i < N_INSTR; i++) begin
      was_in = (m.ir[3:0] == 4'hD);
      cyc = m.step(port_in[0]);
      repeat (cyc) @(posedge clk);
      #1 compare_cpu();
      if (was_in) port_in[0] = port_in[0] + 8'd29;
    end
    cpu_done = 1'b1;
  end

  // ---------------- 16-bit blocks ----------------
  function automatic logic [19:0] ref_alu16(logic [15:0] x, logic [15:0] y, logic cin,
                                             logic c1, logic ex, logic cy, logic [1:0] fn);
    // returns {cout, z, n, ov, result}
    logic [15:0] xs, ys, r;
    logic [16:0] sum;
    logic        co, ov;
    xs  = ex ? x : 16'h0;
    if (c1) xs = 16'hFFFF;
    ys  = cy ? ~y : y;
    sum = {1'b0, xs} + {1'b0, ys} + 17'(cin);
    co = 0; ov = 0;
    case (fn)
      2'd0: begin
        r  = sum[15:0];
        co = sum[16];
        ov = (xs[15] == ys[15]) && (r[15] != xs[15]);
      end
      2'd1: r = xs | ys;
      2'd2: r = xs & ys;
      default: r = xs ^ ys;
    endcase
    return {co, (r == 16'h0), r[15], ov, 16'(r)};
  endfunction

  int n_cout = 0, n_z = 0, n_n = 0, n_ov = 0, n_sub = 0, n_xoff = 0, n_c1 = 0;

  task automatic alu16_case(logic [15:0] x, logic [15:0] y, logic cin, logic c1,
                            logic ex, logic cy, logic [1:0] fn);
    logic [19:0] e;
    m4_x = x; m4_y = y; m4_cin = cin; m4_const1 = c1; m4_enablex = ex;
    m4_compy = cy; m4_fn = fn;
    #1;
    e = ref_alu16(x, y, cin, c1, ex, cy, fn);
    checks++;
    if ({m4_cout, m4_zflag, m4_nflag, m4_ovflag, m4_aluout} !== e) begin
      failures++;
      if (failures < 20)
        $display("FAIL alu16 x=%0d y=%0d cin=%0b c1=%0b ex=%0b cy=%0b fn=%0d: got %h expected %h",
                 x, y, cin, c1, ex, cy, fn,
                 {m4_cout, m4_zflag, m4_nflag, m4_ovflag, m4_aluout}, e);
    end
    if (m4_cout)  n_cout++;
    if (m4_zflag) n_z++;
    if (m4_nflag) n_n++;
    if (m4_ovflag) n_ov++;
    if (cy && cin && fn == 2'd0) n_sub++;
    if (!ex) n_xoff++;
    if (c1) n_c1++;
  endtask

  initial begin
    logic [15:0] val [4];
    logic [15:0] r;
    val[0] = 16'd1000; val[1] = 16'd1001; val[2] = 16'd1002; val[3] = 16'd1003;
    m4_d = 0; m4_ld = 0; m4_selx = 0; m4_sely = 0;
    m4_x = 0; m4_y = 0; m4_cin = 0; m4_const1 = 0; m4_enablex = 1; m4_compy = 0; m4_fn = 0;
    @(negedge clk);
    // load the four registers, one per clock
    for (int k = 0; k < 4; k++) begin
      m4_d = val[k]; m4_ld = 4'b1 << k;
      @(negedge clk);
    end
    m4_ld = 0; m4_d = 16'hDEAD;
    @(negedge clk);
    // read back: X counts up, Y counts down
    for (int k = 0; k < 4; k++) begin
      m4_selx = 2'(k); m4_sely = 2'(3 - k);
      #1;
      checks += 2;
      if (m4_regx !== val[k])     begin failures++; $display("FAIL regx %0d", k); end
      if (m4_regy !== val[3 - k]) begin failures++; $display("FAIL regy %0d", k); end
    end
    // the design's ALU test vectors, checked against the published results
    for (int f = 0; f < 4; f++) alu16_case(16'd35425, 16'd2144, 0, 0, 1, 0, 2'(f));
    checks++; m4_fn = 0; m4_cin = 0; #1 if (m4_aluout !== 16'd37569) failures++;
    for (int f = 0; f < 4; f++) alu16_case(16'd35425, 16'd2144, 1, 0, 1, 0, 2'(f));
    checks++; m4_fn = 0; #1 if (m4_aluout !== 16'd37570) failures++;
    for (int f = 0; f < 4; f++) alu16_case(16'd35425, 16'd2144, 0, 1, 1, 0, 2'(f));
    checks++; m4_fn = 0; #1 if (m4_aluout !== 16'd2143 || !m4_cout) failures++;
    checks++; m4_fn = 3; #1 if (m4_aluout !== 16'd63391) failures++;
    for (int f = 0; f < 4; f++) alu16_case(16'd35425, 16'd0, 0, 0, 1, 0, 2'(f));
    checks++; m4_fn = 2; #1 if (m4_aluout !== 16'd0 || !m4_zflag) failures++;
    // subtraction of two bank registers: X - Y = X + ~Y + 1
    m4_selx = 2'd3; m4_sely = 2'd0; #1;
    alu16_case(m4_regx, m4_regy, 1, 0, 1, 1, 2'd0);
    checks++; if (m4_aluout !== 16'd3) failures++;
    alu16_case(m4_regy, m4_regx, 1, 0, 1, 1, 2'd0);
    checks++; if (m4_aluout !== 16'hFFFD || !m4_nflag) failures++;
    // overflow: 0x7FFF + 1
    alu16_case(16'h7FFF, 16'h0001, 0, 0, 1, 0, 2'd0);
    checks++; if (!m4_ovflag) failures++;
    // random operands and flags
    for (int i = 0; i < N_RAND; i++) begin
      r = 16'($urandom);
      alu16_case(16'($urandom), (i % 7 == 0) ? r : 16'($urandom), 1'($urandom),
                 ($urandom % 8) == 0, ($urandom % 8) != 0, 1'($urandom), 2'($urandom));
    end
    m4_done = 1'b1;
  end

  initial begin
    wait (cpu_done && m4_done);
    need("immediate instruction", m.n_imm);
    need("OUT instruction", m.n_out);
    need("IN instruction", m.n_in);
    need("jump", m.n_jmp);
    need("no-op opcode", m.n_nop);
    for (int k = 0; k < 16; k++) need($sformatf("ALU function %0d", k), m.n_fn[k]);
    for (int k = 0; k < 4; k++) need($sformatf("write to port %0d", k), m.n_outport[k]);
    need("port turned to input", n_in_mode);
    need("memory drives data bus", n_drv_mem);
    need("result register drives data bus", n_drv_alu);
    need("I/O block drives data bus", n_drv_io);
    need("alu16 carry out", n_cout);
    need("alu16 zero flag", n_z);
    need("alu16 negative flag", n_n);
    need("alu16 overflow flag", n_ov);
    need("alu16 subtraction", n_sub);
    need("alu16 X disabled", n_xoff);
    need("alu16 CONST1", n_c1);
    for (int k = 1; k < 8; k++)
      if (k != 6) need($sformatf("single-accumulator CPU strobe S%0d", k), n2_strobe[k]);
    check_m2();
    check_m1();
    $display("cpu: imm=%0d out=%0d in=%0d jmp=%0d nop=%0d; bus cycles mem=%0d alu=%0d io=%0d; input cycles=%0d",
             m.n_imm, m.n_out, m.n_in, m.n_jmp, m.n_nop, n_drv_mem, n_drv_alu, n_drv_io, n_in_mode);
    $display("alu16 flags: cout=%0d z=%0d n=%0d ov=%0d sub=%0d xoff=%0d const1=%0d",
             n_cout, n_z, n_n, n_ov, n_sub, n_xoff, n_c1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
