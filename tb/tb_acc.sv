// tb_acc: self-checking test of one accumulator.
// Random strobe, data and output enables: the register loads D one clock
// after S; outputs A and B show the register when their enable is high
// and 0 otherwise, with no delay.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_acc;
  logic       clk = 0, rst = 1, s = 0, ea = 0, eb = 0;
  logic [7:0] d = 0, a, b, q;
  int checks = 0, failures = 0;

  acc dut (.CLK(clk), .RESET(rst), .S(s), .D(d), .Enable_A(ea), .Enable_B(eb), .A(a), .B(b));
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk();
    checks++;
    if (a !== (ea ? q : 8'h00) || b !== (eb ? q : 8'h00)) begin
      failures++; $display("FAIL q=%h a=%h b=%h", q, a, b);
    end
  endtask

  initial begin
    q = 0;
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk) {s, ea, eb, d} = 11'($urandom);
      #1 chk();
      @(posedge clk); if (s) q = d;
      #1 chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
