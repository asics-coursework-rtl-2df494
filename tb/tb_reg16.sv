// tb_reg16: self-checking test of the 16-bit load-enabled register.
// Random data and load each clock: Q takes D one clock after load is high
// and holds otherwise. The register has no reset, so the bench loads it
// before the first check.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_reg16;
  import alu16_pkg::*;
  logic        clk = 0, ld = 1;
  logic [15:0] d = 0, q, exp;
  int checks = 0, failures = 0, loads = 0;

  reg16 dut (.D(d), .clock(clk), .load(ld), .Q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); exp = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk) begin ld = 1'($urandom); d = 16'($urandom); end
      #1 checks++; if (q !== exp) failures++;
      @(posedge clk); #1;
      if (ld) begin exp = d; loads++; end
      checks++;
      if (q !== exp) begin failures++; $display("FAIL q=%h expected %h", q, exp); end
    end
    checks++; if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
