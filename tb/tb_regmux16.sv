// tb_regmux16: self-checking test of the 4-to-1 16-bit multiplexer.
// First the design's own vectors (1000, 2000, 3000, 4000 selected in turn),
// then random inputs and selects. Combinational, checked 1 time unit later.
// The published test values come from the design's own tests; the random
// stimulus, the reference model and the run lengths are this bench's choice.
module tb_regmux16;
  import alu16_pkg::*;
  logic [15:0] r [4];
  logic [15:0] q;
  logic [1:0]  sel;
  int checks = 0, failures = 0;

  regmux16 dut (.R00(r[0]), .R01(r[1]), .R10(r[2]), .R11(r[3]), .SEL(sel), .Q(q));

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk();
    #1 checks++;
    if (q !== r[sel]) begin failures++; $display("FAIL sel=%0d q=%0d", sel, q); end
  endtask

  initial begin
    r[0] = 1000; r[1] = 2000; r[2] = 3000; r[3] = 4000;
    for (int k = 0; k < 4; k++) begin sel = 2'(k); chk(); end
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < 4; k++) r[k] = 16'($urandom);
      sel = 2'($urandom);
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
