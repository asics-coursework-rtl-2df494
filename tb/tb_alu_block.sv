// tb_alu_block: self-checking test of accumulator bank + ALU + result
// register. Random controls each clock against a model: S1 writes the bus
// into accumulator SW, S3 captures ALU(FN, acc[SA], acc[SB]) in the result
// register, and RESE puts the result register on the data bus. Both
// registers update one clock after their strobe; the bus output is
// combinational. The ALU reference is the one in shc3_model_pkg.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_alu_block;
  import shc3_model_pkg::*;
  logic       clk = 0, rst = 1, s1 = 0, s3 = 0, rese = 0;
  logic [2:0] sw = 0, sa = 0, sb = 0;
  logic [3:0] fn = 0;
  logic [7:0] d_in = 0, d_out, res;
  logic       d_drv;
  logic [7:0] r [8];
  int checks = 0, failures = 0, n_res = 0;

  alu_block dut (.CLK(clk), .RST(rst), .d_in(d_in), .d_out(d_out), .d_drv(d_drv),
                 .SW(sw), .SA(sa), .SB(sb), .S1(s1), .S3(s3), .RESE(rese), .FN(fn));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk();
    checks++;
    if (d_out !== (rese ? res : 8'h00) || d_drv !== rese) begin
      failures++; $display("FAIL res=%h d_out=%h drv=%b", res, d_out, d_drv);
    end
  endtask

  initial begin
    logic [7:0] nres;
    for (int k = 0; k < 8; k++) r[k] = 0;
    res = 0;
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk) begin
        s1 = 1'($urandom); s3 = 1'($urandom); rese = 1'($urandom);
        sw = 3'($urandom); sa = 3'($urandom); sb = 3'($urandom);
        fn = 4'($urandom); d_in = 8'($urandom);
      end
      #1 chk();
      nres = shc3_model::alu(fn, r[sa], r[sb]);
      @(posedge clk);
      if (s1) r[sw] = d_in;
      if (s3) begin res = nres; n_res++; end
      #1 chk();
    end
    checks++; if (n_res == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
