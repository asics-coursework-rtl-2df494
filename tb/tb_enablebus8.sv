// tb_enablebus8: self-checking test of the 8-bit AND gate array.
// F = A when I is high, else 0; combinational, checked 1 time unit later.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_enablebus8;
  logic [7:0] a, f;
  logic       i;
  int checks = 0, failures = 0;

  enablebus8 dut (.A(a), .I(i), .F(f));

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      a = 8'($urandom); i = 1'($urandom);
      #1 checks++;
      if (f !== (a & {8{i}})) begin failures++; $display("FAIL a=%h i=%b f=%h", a, i, f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
