// tb_regbank8: self-checking test of the eight-accumulator bank.
// Random write select, read selects A and B, strobe and data against a
// model of eight registers. A write lands one clock after S in the register
// chosen by SW; reads through SA and SB are combinational.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_regbank8;
  logic       clk = 0, rst = 1, s = 0;
  logic [2:0] sw = 0, sa = 0, sb = 0;
  logic [7:0] d = 0, a, b;
  logic [7:0] r [8];
  int checks = 0, failures = 0;
  int nw [8];

  regbank8 dut (.CLK(clk), .RST(rst), .S(s), .D(d), .SW(sw), .SA(sa), .SB(sb), .A(a), .B(b));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk();
    checks++;
    if (a !== r[sa] || b !== r[sb]) begin
      failures++; $display("FAIL sa=%0d sb=%0d a=%h b=%h", sa, sb, a, b);
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++) begin r[k] = 0; nw[k] = 0; end
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk) begin
        s = 1'($urandom); sw = 3'($urandom); sa = 3'($urandom); sb = 3'($urandom); d = 8'($urandom);
      end
      #1 chk();
      @(posedge clk); if (s) begin r[sw] = d; nw[sw]++; end
      #1 chk();
    end
    for (int k = 0; k < 8; k++) begin checks++; if (nw[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
