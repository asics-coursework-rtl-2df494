// tb_t_cell: self-checking test of one program-counter bit.
// Random t, d, s, I each clock against a one-line model: s loads d;
// otherwise with I high the bit toggles when t is high; otherwise it holds.
// The new value appears one clock after the inputs; reset clears it.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_t_cell;
  logic clk = 0, rst = 0, t = 0, d = 0, s = 0, inc = 0, q, exp;
  int checks = 0, failures = 0, toggles = 0, loads = 0;

  t_cell dut (.t(t), .d(d), .s(s), .I(inc), .clk(clk), .reset(rst), .q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1 rst = 1; #1 checks++; if (q !== 0) failures++;
    @(negedge clk) rst = 0; exp = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk) {t, d, s, inc} = 4'($urandom);
      @(posedge clk); #1;
      if (s) begin exp = d; loads++; end
      else if (inc && t) begin exp = ~exp; toggles++; end
      checks++;
      if (q !== exp) begin failures++; $display("FAIL t=%b d=%b s=%b I=%b q=%b", t, d, s, inc, q); end
    end
    checks++; if (toggles == 0 || loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
