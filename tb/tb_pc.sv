// tb_pc: self-checking test of the 8-bit program counter.
// Counts from 0 with i held high and checks the wrap to 0 after exactly
// 256 clocks, then random load/increment/hold operations against a model:
// s loads d (priority), else i increments, else hold. One clock latency.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_pc;
  logic       clk = 0, rst = 1, inc = 0, s = 0;
  logic [7:0] d = 0, q, exp;
  int checks = 0, failures = 0, wraps = 0, loads = 0;

  pc dut (.d(d), .i(inc), .s(s), .clk(clk), .reset(rst), .q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk();
    checks++;
    if (q !== exp) begin failures++; $display("FAIL q=%h expected %h", q, exp); end
  endtask

  initial begin
    #1 checks++; if (q !== 0) failures++;
    @(negedge clk) begin rst = 0; inc = 1; end
    exp = 0;
    for (int n = 0; n < 256; n++) begin
      @(posedge clk); #1 exp = exp + 1; chk();
      if (exp == 0) wraps++;
    end
    checks++; if (wraps != 1) failures++;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk) begin
        s = ($urandom % 6 == 0); inc = 1'($urandom); d = 8'($urandom);
      end
      @(posedge clk); #1;
      if (s) begin exp = d; loads++; end else if (inc) exp = exp + 1;
      chk();
    end
    checks++; if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
