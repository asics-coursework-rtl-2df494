// tb_regsel: self-checking test of the four-register bank with two read
// ports. First the design's own test (1000-1003 loaded into registers 0-3,
// one per clock, then read back on X and Y), then random load vectors
// (several LD bits may be set at once) and read selects against a model.
// Loads take effect one clock after LD; reads are combinational.
// The published test values come from the design's own tests; the random
// stimulus, the reference model and the run lengths are this bench's choice.
module tb_regsel;
  import alu16_pkg::*;
  logic        clk = 0;
  logic [15:0] d = 0, x, y;
  logic [3:0]  ld = 4'hF;
  logic [1:0]  sx = 0, sy = 0;
  logic [15:0] r [4];
  int checks = 0, failures = 0;

  regsel dut (.D(d), .LD(ld), .SELX(sx), .SELY(sy), .CLOCK(clk), .REGX(x), .REGY(y));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk();
    #1 checks++;
    if (x !== r[sx] || y !== r[sy]) begin
      failures++; $display("FAIL sx=%0d sy=%0d x=%0d y=%0d", sx, sy, x, y);
    end
  endtask

  initial begin
    // clear all four registers (no reset in the design)
    @(posedge clk);
    for (int k = 0; k < 4; k++) r[k] = 0;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk) begin d = 16'(1000 + k); ld = 4'b1 << k; end
      @(posedge clk) r[k] = d;
    end
    @(negedge clk) ld = 0;
    for (int k = 0; k < 4; k++) begin sx = 2'(k); sy = 2'(3 - k); chk(); end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk) begin
        d = 16'($urandom); ld = 4'($urandom); sx = 2'($urandom); sy = 2'($urandom);
      end
      chk();
      @(posedge clk);
      for (int k = 0; k < 4; k++) if (ld[k]) r[k] = d;
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
