// tb_shc_top_full: full-size run of the top level with every parameter at
// its default, so the CPU executes the built-in ROM program: four
// accumulators add 2, 4, 8 and 16 and are written to ports A-D, then a jump
// back to address 0. One loop is 4 x (10 + 6) + 6 = 70 clocks after the
// 3-clock power-up fetch.
//
// For N_LOOPS loops the bench checks, at the exact clock each instruction
// should end: that a port still holds the old value after its ADD and holds
// the new value after its OUT, and that the address bus shows 1 (the opcode
// at 0 has just been fetched) after
// the jump. It also checks that each port changes exactly once per loop,
// and that the 16-bit register bank and ALU are wired up (one load, one
// add) in the same instance. The single-accumulator CPU runs its built-in
// program alongside; its first 200 output values (80, 85, 95, 90, then +10
// and -5 in turn) are checked with the clock at which each appears, and
// so are the first 200 values (1, 2, 3, ...) of the simple CPU.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_shc_top_full;
  localparam int N_LOOPS = 300;
  localparam int LOOP    = 4 * (shc_pkg::CYC_IMM + shc_pkg::CYC_OUT) + shc_pkg::CYC_JMP;

  logic            clk = 1'b0, rst = 1'b1;
  logic [7:0]      address;
  logic [7:0][7:0] port_in, port_out;
  logic [7:0]      port_oe;
  logic [7:0]      m2_d, m2_ab, m2_portaOP, m2_S;
  logic [11:0]     m1_CU;
  logic [7:0]      m1_PROG, m1_portaOP, m1_S;
  logic [2:0]      m1_AB;
  logic [15:0]     m4_d, m4_regx, m4_regy, m4_x, m4_y, m4_aluout;
  logic [3:0]      m4_ld;
  logic [1:0]      m4_selx, m4_sely, m4_fn;
  logic            m4_cin, m4_const1, m4_enablex, m4_compy;
  logic            m4_cout, m4_zflag, m4_nflag, m4_ovflag;

  int checks = 0, failures = 0;

  shc_top dut (
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
    repeat (N_LOOPS * LOOP + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count value changes on each port
  int         n_change [4];
  logic [7:0] prev [4];
  always @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      if (!rst && port_out[k] !== prev[k]) n_change[k]++;
      prev[k] <= port_out[k];
    end
  end

  // ---------------- single-accumulator CPU, built-in program ----------------
  localparam int N2 = 200;
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
  localparam int N1 = 200;
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

  task automatic check(string what, logic [15:0] got, logic [15:0] exp, int loop);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL loop %0d %s: got %0h expected %0h", loop, what, got, exp);
    end
  endtask

  initial begin
    logic [7:0] step [4];
    step[0] = 8'd2; step[1] = 8'd4; step[2] = 8'd8; step[3] = 8'd16;
    port_in = '0;
    m4_d = 16'd1234; m4_ld = 4'b0100; m4_selx = 2'd2; m4_sely = 2'd2;
    m4_x = 16'd35425; m4_y = 16'd2144; m4_cin = 0; m4_const1 = 0;
    m4_enablex = 1; m4_compy = 0; m4_fn = 2'd0;
    for (int k = 0; k < 4; k++) begin n_change[k] = 0; prev[k] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    m4_ld = 4'b0;
    repeat (shc_pkg::CYC_FETCH) @(posedge clk);
    #1 check("start address", 16'(address), 16'h01, 0);
    for (int i = 1; i <= N_LOOPS; i++) begin
      for (int k = 0; k < 4; k++) begin
        repeat (shc_pkg::CYC_IMM) @(posedge clk);
        #1 check($sformatf("port %0d before OUT", k), 16'(port_out[k]), 16'(8'((i - 1) * step[k])), i);
        repeat (shc_pkg::CYC_OUT) @(posedge clk);
        #1 check($sformatf("port %0d after OUT", k), 16'(port_out[k]), 16'(8'(i * step[k])), i);
      end
      repeat (shc_pkg::CYC_JMP) @(posedge clk);
      #1 check("address after JMP", 16'(address), 16'h01, i);
      check("port_oe", 16'(port_oe), 16'hFF, i);
    end
    for (int k = 0; k < 4; k++)
      check($sformatf("port %0d change count", k), 16'(n_change[k]), 16'(N_LOOPS), N_LOOPS);
    check("regsel readback", m4_regx, 16'd1234, 0);
    check("alu16 add", m4_aluout, 16'd37569, 0);
    check_m2();
    check_m1();
    $display("loops=%0d cycles/loop=%0d port changes=%0d/%0d/%0d/%0d",
             N_LOOPS, LOOP, n_change[0], n_change[1], n_change[2], n_change[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
