// tb_cpu_programs: runs five short programs on the eight-accumulator CPU
// and two of them on the single-accumulator CPU, one CPU instance each
// (programs 5 and 6 are prog_inc1 and prog_dec16 on the latter), and checks the sequence of values that appears on port A
// and the number of clocks between successive changes.
//   prog_inc1   ADDA #1 / OUTA / JMP 0   -> 1, 2, 3, ...     every 22 clocks
//   prog_inc7   ADDA #7 / OUTA / JMP 0   -> 7, 14, 21, ...   every 22 clocks
//   prog_dec3   SUBA #3 / OUTA / JMP 0   -> 253, 250, ...    every 22 clocks
//   prog_dec16  SUBA #16 / OUTA / JMP 0  -> 240, 224, ...    every 22 clocks
//   prog_mixed  LDA #80, XORA #5, ADDA #10, SUBA #5, loop to the second OUTA
//               -> 80, 85, 95, 90, then +10 / -5 alternately; 16 clocks
//               between changes inside the loop body, 28 across the jump
// 22 = ADD (10) + OUT (6) + JMP (6). The first change of every program comes
// 16 clocks after reset: 3 for the power-up fetch, 10 for the first
// immediate instruction and 3 into the OUT micro-program.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_cpu_programs;
  localparam int NPROG = 7;
  localparam int NCHG  = 40;

  logic clk = 1'b0, rst = 1'b1;
  int   cyc = 0;
  int   n_chg [NPROG];
  int   t_chg [NPROG][NCHG];
  logic [7:0] v_chg [NPROG][NCHG];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  initial begin
    repeat (NCHG * 30 + 100) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar g = 0; g < 5; g++) begin : g_cpu
    localparam string F = (g == 0) ? "tb/prog_inc1.hex"  :
                          (g == 1) ? "tb/prog_inc7.hex"  :
                          (g == 2) ? "tb/prog_dec3.hex"  :
                          (g == 3) ? "tb/prog_dec16.hex" : "tb/prog_mixed.hex";
    logic [7:0]      address;
    logic [7:0][7:0] port_out;
    logic [7:0]      port_oe;
    logic [7:0]      prev;

    shc3_top #(.PROG_FILE(F)) u_cpu (
      .CLK(clk), .RST(rst), .ADDRESS(address),
      .port_in('0), .port_out(port_out), .port_oe(port_oe)
    );

    initial begin n_chg[g] = 0; prev = 8'h00; end
    always @(negedge clk) if (!rst) begin
      if (port_out[0] != prev && n_chg[g] < NCHG) begin
        t_chg[g][n_chg[g]] = cyc;
        v_chg[g][n_chg[g]] = port_out[0];
        n_chg[g]++;
      end
      prev = port_out[0];
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_cpu2
    localparam string F = (g == 0) ? "tb/prog_inc1.hex" : "tb/prog_dec16.hex";
    logic [7:0] d, ab, porta, s;
    logic [7:0] prev;

    shc2_top #(.PROG_FILE(F)) u_cpu (
      .CLK(clk), .RESET(rst), .d(d), .ab(ab), .portaOP(porta), .S(s)
    );

    initial begin n_chg[5 + g] = 0; prev = 8'h00; end
    always @(negedge clk) if (!rst) begin
      if (porta != prev && n_chg[5 + g] < NCHG) begin
        t_chg[5 + g][n_chg[5 + g]] = cyc;
        v_chg[5 + g][n_chg[5 + g]] = porta;
        n_chg[5 + g]++;
      end
      prev = porta;
    end
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    logic [7:0] ev [NPROG][NCHG];
    int         et [NPROG][NCHG];
    logic [7:0] step [4];
    step[0] = 8'd1; step[1] = 8'd7; step[2] = 8'd253; step[3] = 8'd240;
    for (int p = 0; p < 4; p++)
      for (int i = 0; i < NCHG; i++) begin
        ev[p][i] = 8'((i + 1) * step[p]);
        et[p][i] = 16 + 22 * i;
      end
    for (int i = 0; i < NCHG; i++) begin
      ev[5][i] = ev[0][i]; et[5][i] = et[0][i];
      ev[6][i] = ev[3][i]; et[6][i] = et[3][i];
    end
    // mixed program: 80, 85, 95, 90, then +10 / -5
    ev[4][0] = 8'd80; ev[4][1] = 8'd85; ev[4][2] = 8'd95; ev[4][3] = 8'd90;
    et[4][0] = 16;    et[4][1] = 32;    et[4][2] = 48;    et[4][3] = 64;
    for (int i = 4; i < NCHG; i++) begin
      ev[4][i] = (i % 2 == 0) ? ev[4][i-1] + 8'd10 : ev[4][i-1] - 8'd5;
      et[4][i] = et[4][i-1] + ((i % 2 == 0) ? 28 : 16);
    end

    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (n_chg[0] == NCHG && n_chg[1] == NCHG && n_chg[2] == NCHG &&
          n_chg[3] == NCHG && n_chg[4] == NCHG && n_chg[5] == NCHG &&
          n_chg[6] == NCHG);
    for (int p = 0; p < NPROG; p++)
      for (int i = 0; i < NCHG; i++) begin
        chk($sformatf("program %0d change %0d value", p, i), int'(v_chg[p][i]), int'(ev[p][i]));
        chk($sformatf("program %0d change %0d clock", p, i), t_chg[p][i], et[p][i]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
