// tb_lat8: self-checking test of the 8-bit strobed register.
// Random data and strobes: the output takes din on a clock edge with S high
// (one clock of latency) and holds otherwise; reset clears it at once.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_lat8;
  logic       clk = 0, rst = 0, s = 0;
  logic [7:0] din = 0, q, exp;
  int checks = 0, failures = 0, loads = 0;

  lat8 dut (.CLK(clk), .reset(rst), .S(s), .din(din), .qout(q));
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst = 1; #1 checks++; if (q !== 0) failures++;
    @(negedge clk) rst = 0; exp = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk) begin s = 1'($urandom); din = 8'($urandom); end
      // not visible before the edge
      #1 checks++; if (q !== exp) failures++;
      @(posedge clk); #1;
      if (s) begin exp = din; loads++; end
      checks++;
      if (q !== exp) begin failures++; $display("FAIL q=%h exp=%h", q, exp); end
    end
    @(negedge clk) rst = 1; #1 checks++; if (q !== 0) failures++;
    checks++; if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
