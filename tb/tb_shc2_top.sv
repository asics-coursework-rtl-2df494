// tb_shc2_top: runs the single-accumulator CPU against its instruction-level
// model (shc2_model_pkg).
//
// Instance u_all runs tb/shc2_all.hex, which uses every ALU function in
// both the immediate and the output micro-program, two unused opcodes and a
// jump. The bench steps the model one instruction at a time, waits exactly
// the clocks the instruction should take, and then compares the address
// bus, IR, ACC, MDR and the output port. Instance u_def runs the built-in
// program (load 80, XOR 5, add 10, subtract 5 in a loop) and checks the
// port values 80, 85, 95, 90, 100, 95, 105, ... with 16 clocks between
// changes inside the loop body and 28 across the jump. It also counts
// the strobes seen on S[7:1]; each one used by the microcode must occur.
// The published program and results come from the design's own tests; the
// model, the coverage program and the run lengths are this bench's choice.
module tb_shc2_top;
  import shc2_model_pkg::*;

  localparam int N_INSTR = 400;
  localparam int NCHG    = 30;

  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] d, ab, port, s;
  logic [7:0] d2, ab2, port2, s2;
  int checks = 0, failures = 0;
  int n_strobe [8];
  int cyc = 0;

  shc2_top #(.PROG_FILE("tb/shc2_all.hex")) u_all (
    .CLK(clk), .RESET(rst), .d(d), .ab(ab), .portaOP(port), .S(s)
  );
  shc2_top u_def (.CLK(clk), .RESET(rst), .d(d2), .ab(ab2), .portaOP(port2), .S(s2));

  always #5 clk = ~clk;

  initial begin
    repeat (N_INSTR * 10 + 200) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial for (int k = 0; k < 8; k++) n_strobe[k] = 0;
  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    for (int k = 0; k < 8; k++) if (s[k]) n_strobe[k]++;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // default program: record port changes
  int         n_chg = 0;
  int         t_chg [NCHG];
  logic [7:0] v_chg [NCHG];
  logic [7:0] prev2 = 8'h00;
  always @(negedge clk) if (!rst) begin
    if (port2 != prev2 && n_chg < NCHG) begin
      t_chg[n_chg] = cyc; v_chg[n_chg] = port2; n_chg++;
    end
    prev2 = port2;
  end

  shc2_model  m;
  logic [7:0] image [256];

  task automatic compare();
    chk("address", int'(ab), int'(m.pc));
    chk("ir", int'(u_all.u_cu.ir), int'(m.ir));
    chk("acc", int'(u_all.acc_q), int'(m.acc));
    chk("mdr", int'(u_all.mdr_q), int'(m.mdr));
    chk("port", int'(port), int'(m.port));
  endtask

  initial begin
    int cycles;
    logic [7:0] ev;
    int         et;
    m = new();
    for (int k = 0; k < 256; k++) image[k] = 8'h00;
    $readmemh("tb/shc2_all.hex", image);
    m.rom = image;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    cycles = m.reset_fetch();
    repeat (cycles) @(posedge clk);
    #1 compare();
    for (int i = 0; i < N_INSTR; i++) begin
      cycles = m.step();
      repeat (cycles) @(posedge clk);
      #1 compare();
    end
    // mechanisms
    chk("immediates seen", int'(m.n_imm > 0), 1);
    chk("outputs seen", int'(m.n_out > 0), 1);
    chk("jumps seen", int'(m.n_jmp > 0), 1);
    chk("no-ops seen", int'(m.n_nop > 0), 1);
    for (int f = 0; f < 16; f++) begin
      chk($sformatf("immediate fn %0d seen", f), int'(m.n_fn_imm[f] > 0), 1);
      chk($sformatf("output fn %0d seen", f), int'(m.n_fn_out[f] > 0), 1);
    end
    for (int k = 1; k < 8; k++)
      if (k != 6) chk($sformatf("strobe S%0d seen", k), int'(n_strobe[k] > 0), 1);
    // default program
    chk("default program changes", n_chg, NCHG);
    ev = 8'd80; et = 16;
    for (int i = 0; i < NCHG; i++) begin
      if (i > 0) begin
        case (i)
          1: ev = ev ^ 8'd5;
          2: ev = ev + 8'd10;
          3: ev = ev - 8'd5;
          default: ev = (i % 2 == 0) ? ev + 8'd10 : ev - 8'd5;
        endcase
        et = et + ((i >= 4 && i % 2 == 0) ? 28 : 16);
      end
      chk($sformatf("default change %0d value", i), int'(v_chg[i]), int'(ev));
      chk($sformatf("default change %0d clock", i), t_chg[i], et);
    end
    $display("imm=%0d out=%0d jmp=%0d nop=%0d", m.n_imm, m.n_out, m.n_jmp, m.n_nop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
