// tb_upc: self-checking test of the 4-bit micro-program counter.
// Checks the asynchronous reset, that the count advances by one per clock
// and wraps from 15 to 0 after exactly 16 clocks, and that the synchronous
// clear returns it to 0 on the next edge from random positions.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_upc;
  logic       clk = 0, clr = 0, rst = 0;
  logic [3:0] q, exp;
  int checks = 0, failures = 0, wraps = 0, clears = 0;

  upc dut (.CLK(clk), .CLR(clr), .RESET(rst), .Q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(logic [3:0] e);
    checks++;
    if (q !== e) begin failures++; $display("FAIL q=%0d expected %0d", q, e); end
  endtask

  initial begin
    #1 rst = 1; #1 chk(0);
    @(negedge clk) rst = 0;
    exp = 0;
    // free count: 48 clocks gives three wraps
    for (int i = 1; i <= 48; i++) begin
      @(posedge clk); #1 exp = exp + 1; chk(exp);
      if (exp == 0) wraps++;
    end
    checks++; if (wraps != 3) failures++;
    // random synchronous clears
    for (int i = 0; i < 500; i++) begin
      @(negedge clk) clr = ($urandom % 5 == 0);
      @(posedge clk); #1;
      if (clr) begin exp = 0; clears++; end else exp = exp + 1;
      chk(exp);
    end
    // asynchronous reset between edges
    @(negedge clk) rst = 1; #1 chk(0); rst = 0;
    checks++; if (clears == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
