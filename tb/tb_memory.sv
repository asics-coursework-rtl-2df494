// tb_memory: self-checking test of the memory block (PC, MAR, ROM, RAM).
// 1. Reads the built-in program by stepping the PC (PCI, one increment per
//    clock) with the ROM on the bus, and compares it with the program file.
// 2. Loads the PC from the bus (S5) and checks the jump target.
// 3. Loads the MAR (S6), switches the address bus to it (PCE high) and runs
//    random RAM writes and reads against a model; a write takes effect at
//    the clock edge, a read is combinational.
// The control input CU is {RAM_OUTE, RAM_WE, ROME, PCE, PCI}.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_memory;
  localparam string PROG = "rtl/shc3_prog.hex";
  logic       clk = 0, rst = 1, s5 = 0, s6 = 0;
  logic [7:0] d_in = 0, d_out, address;
  logic       d_drv;
  logic       ram_oute = 0, ram_we = 0, rom_e = 0, pce_n = 0, pci = 0;
  logic [7:0] image [256];
  logic [7:0] ram [256];
  int checks = 0, failures = 0, n_wr = 0, n_rd = 0;

  memory dut (.CLK(clk), .RST(rst), .d_in(d_in), .d_out(d_out), .d_drv(d_drv),
              .CU({ram_oute, ram_we, rom_e, pce_n, pci}), .S5(s5), .S6(s6),
              .address(address));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", what, got, exp); end
  endtask

  initial begin
    for (int k = 0; k < 256; k++) begin image[k] = 0; ram[k] = 0; end
    $readmemh(PROG, image);
    @(negedge clk) rst = 0;
    // 1. sequential ROM read
    rom_e = 1; pci = 1;
    for (int k = 0; k < 20; k++) begin
      #1 chk("address", address, 8'(k));
      chk("rom", d_out, image[k]);
      checks++; if (!d_drv) failures++;
      @(negedge clk);
    end
    // 2. jump
    pci = 0; rom_e = 0; d_in = 8'h5A; s5 = 1;
    #1 chk("bus idle", d_out, 8'h00);
    @(negedge clk) s5 = 0;
    chk("pc load", address, 8'h5A);
    @(negedge clk) chk("pc hold", address, 8'h5A);
    // 3. RAM through the MAR
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk) begin
        d_in = 8'($urandom % 16); s6 = 1; pce_n = 1; ram_we = 0; ram_oute = 0;
      end
      @(negedge clk) begin
        s6 = 0;
        chk("mar", address, d_in);
        ram_we = 1'($urandom); ram_oute = !ram_we; d_in = 8'($urandom);
      end
      #1 if (ram_oute) begin chk("ram read", d_out, ram[address]); n_rd++; end
      @(posedge clk) if (ram_we) begin ram[address] = d_in; n_wr++; end
    end
    @(negedge clk) begin ram_we = 0; ram_oute = 0; pce_n = 0; end
    #1 chk("pc back on address bus", address, 8'h5A);
    checks++; if (n_wr == 0 || n_rd == 0) failures++;
    $display("ram writes=%0d reads=%0d", n_wr, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
