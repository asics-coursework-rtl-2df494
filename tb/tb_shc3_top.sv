// tb_shc3_top: runs the 8-bit CPU against an instruction-level reference
// model.
//
// The program tb/shc3_all.hex uses every micro-program (immediates on A..D,
// every OUT variant, INA, JMP, no-op opcodes) and all 16 ALU function
// codes. The testbench reads the same image into its own model, steps the
// model one instruction at a time and waits exactly the number of clock
// cycles the instruction should take (10 for an immediate, 6 for
// OUT/IN/JMP, 3 for a no-op). At each instruction boundary it compares
// the address bus (the PC), the instruction register, all eight
// accumulators, all eight ports and the port directions with the model,
// so a wrong result or a wrong cycle count both fail. Port A's pins change
// between IN instructions. Each kind of instruction is counted and must
// occur.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_shc3_top;
  import shc3_model_pkg::*;

  localparam string PROG = "tb/shc3_all.hex";
  localparam int    N_INSTR = 400;

  logic            clk = 1'b0, rst = 1'b1;
  logic [7:0]      address;
  logic [7:0][7:0] port_in, port_out;
  logic [7:0]      port_oe;

  int checks = 0, failures = 0;

  shc3_top #(.PROG_FILE(PROG)) dut (
    .CLK(clk), .RST(rst), .ADDRESS(address),
    .port_in(port_in), .port_out(port_out), .port_oe(port_oe)
  );

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (N_INSTR * 10 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accumulators of the design, read for comparison only
  logic [7:0] dacc [8];
  always_comb begin
    dacc[0] = dut.u_alu.u_bank.g_acc[0].u_acc.u_lat.qout;
    dacc[1] = dut.u_alu.u_bank.g_acc[1].u_acc.u_lat.qout;
    dacc[2] = dut.u_alu.u_bank.g_acc[2].u_acc.u_lat.qout;
    dacc[3] = dut.u_alu.u_bank.g_acc[3].u_acc.u_lat.qout;
    dacc[4] = dut.u_alu.u_bank.g_acc[4].u_acc.u_lat.qout;
    dacc[5] = dut.u_alu.u_bank.g_acc[5].u_acc.u_lat.qout;
    dacc[6] = dut.u_alu.u_bank.g_acc[6].u_acc.u_lat.qout;
    dacc[7] = dut.u_alu.u_bank.g_acc[7].u_acc.u_lat.qout;
  end

  // ---------------- reference model ----------------
  shc3_model m;
  logic [7:0] image [256];
  int        n_in_mode;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at pc %02h ir %02h: got %02h expected %02h",
                 what, m.pc, m.ir, got, exp);
    end
  endtask

  task automatic compare_all();
    check("address", address, m.pc);
    check("ir", dut.u_cu.ir, m.ir);
    for (int k = 0; k < 8; k++) check($sformatf("acc%0d", k), dacc[k], m.acc[k]);
    // in the first step of INA port A is already turned round to input
    for (int k = 0; k < 8; k++)
      check($sformatf("port%0d", k), port_out[k],
            (k == 0 && m.ir == 8'h0D) ? 8'h00 : m.port[k]);
    check("port_oe", port_oe, (m.ir == 8'h0D) ? 8'hFE : 8'hFF);
  endtask

  // count cycles in which port A is turned round for input
  always @(posedge clk) if (!rst && !port_oe[0]) n_in_mode++;

  initial begin
    int cyc;
    logic was_in;
    m = new();
    $readmemh(PROG, image);
    m.rom = image;
    n_in_mode = 0;
    port_in = '0;
    port_in[0] = 8'h3C;
    for (int k = 1; k < 8; k++) port_in[k] = 8'(8'h10 * k + 1);

    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    cyc = m.reset_fetch();
    repeat (cyc) @(posedge clk);
    #1 compare_all();

    for (int i = 0; i < N_INSTR; i++) begin
      was_in = (m.ir[3:0] == 4'hD);
      cyc = m.step(port_in[0]);
      repeat (cyc) @(posedge clk);
      #1 compare_all();
      // new pin value for the next IN
      if (was_in) port_in[0] = port_in[0] * 8'd5 + 8'd7;
    end

    // every mechanism must have occurred
    checks++; if (m.n_imm == 0)   begin failures++; $display("no immediate"); end
    checks++; if (m.n_out == 0)   begin failures++; $display("no OUT"); end
    checks++; if (m.n_in == 0)    begin failures++; $display("no IN"); end
    checks++; if (m.n_jmp == 0)   begin failures++; $display("no JMP"); end
    checks++; if (m.n_nop == 0)   begin failures++; $display("no no-op"); end
    checks++; if (n_in_mode == 0) begin failures++; $display("port never an input"); end
    for (int k = 0; k < 16; k++) begin
      checks++; if (m.n_fn[k] == 0) begin failures++; $display("ALU fn %0d unused", k); end
    end
    for (int k = 0; k < 4; k++) begin
      checks++; if (m.n_outport[k] == 0) begin failures++; $display("port %0d never written", k); end
    end
    $display("imm=%0d out=%0d in=%0d jmp=%0d nop=%0d in_mode_cycles=%0d",
             m.n_imm, m.n_out, m.n_in, m.n_jmp, m.n_nop, n_in_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
