// tb_reg8: self-checking test of the register-with-bus-driver.
// Random S, E and D each clock against a model: the register loads D one
// clock after S; Q shows it while E is high and is 0 otherwise, and drv
// equals E. Reset is raised as an edge first and must clear the register.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_reg8;
  logic       clk = 0, rst = 0, s = 0, e = 0;
  logic [7:0] d = 0, q, r;
  logic       drv;
  int checks = 0, failures = 0, loads = 0;

  reg8 dut (.CLK(clk), .RESET(rst), .S(s), .E(e), .D(d), .Q(q), .drv(drv));
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk();
    checks++;
    if (q !== (e ? r : 8'h00) || drv !== e) begin
      failures++; $display("FAIL r=%h e=%b q=%h drv=%b", r, e, q, drv);
    end
  endtask

  initial begin
    #1 rst = 1; e = 1; r = 0;
    #1 chk();
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk) {s, e, d} = 10'($urandom);
      #1 chk();
      @(posedge clk); if (s) begin r = d; loads++; end
      #1 chk();
    end
    checks++; if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
