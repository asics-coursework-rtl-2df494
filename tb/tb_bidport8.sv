// tb_bidport8: self-checking test of one bidirectional 8-bit port.
// Random IO, S, bus data and pin data each clock against a model of the
// port latch: output mode (IO = 0) latches the data bus on S and drives the
// pins; input mode (IO = 1) latches the pins on S and drives the latch onto
// the data bus. The latch updates one clock after S; the output enables
// follow IO with no delay.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_bidport8;
  logic       clk = 0, rst = 1, s = 0, io = 0;
  logic [7:0] port_in = 0, d_in = 0, port_out, d_out, lat;
  logic       port_oe, d_drv;
  int checks = 0, failures = 0, n_out = 0, n_in = 0;

  bidport8 dut (.CLK(clk), .RESET(rst), .S(s), .IO(io), .port_in(port_in),
                .port_out(port_out), .port_oe(port_oe), .d_in(d_in),
                .d_out(d_out), .d_drv(d_drv));
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk();
    checks++;
    if (port_out !== (io ? 8'h00 : lat) || port_oe !== !io ||
        d_out !== (io ? lat : 8'h00) || d_drv !== io) begin
      failures++;
      $display("FAIL io=%b lat=%h port_out=%h oe=%b d_out=%h drv=%b",
               io, lat, port_out, port_oe, d_out, d_drv);
    end
  endtask

  initial begin
    lat = 0;
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk) begin
        io = 1'($urandom); s = 1'($urandom); d_in = 8'($urandom); port_in = 8'($urandom);
      end
      #1 chk();
      @(posedge clk);
      if (s) begin lat = io ? port_in : d_in; if (io) n_in++; else n_out++; end
      #1 chk();
    end
    checks++; if (n_in == 0 || n_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
