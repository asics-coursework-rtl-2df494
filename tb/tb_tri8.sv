// tb_tri8: self-checking test of the 8-bit bus driver.
// With E high the output equals the input and drv is 1; with E low the
// output is 0 (this design's stand-in for high impedance) and drv is 0.
// The output is combinational: checked 1 time unit after each change.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_tri8;
  logic       e;
  logic [7:0] i, d;
  logic       drv;
  int checks = 0, failures = 0, on = 0, off = 0;

  tri8 dut (.E(e), .I(i), .d(d), .drv(drv));

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      e = 1'($urandom); i = 8'($urandom);
      #1;
      checks++;
      if (d !== (e ? i : 8'h00) || drv !== e) begin
        failures++; $display("FAIL e=%b i=%h d=%h drv=%b", e, i, d, drv);
      end
      if (e) on++; else off++;
    end
    checks++; if (on == 0 || off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
