// tb_inputoutput: self-checking test of the eight-port I/O block.
// Random port select, strobe, direction, bus enable and data each clock
// against a model of the eight port latches. Only the selected port sees
// S and IO; the other ports stay outputs and keep their values. With E
// high the selected port (if an input) drives the data bus; with E low the
// data bus feeds the ports. Latches update one clock after the strobe.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_inputoutput;
  logic            clk = 0, rst = 1, s = 0, io = 0, e = 0;
  logic [2:0]      sel = 0;
  logic [7:0]      d_in = 0, d_out;
  logic            d_drv;
  logic [7:0][7:0] port_in = '0, port_out;
  logic [7:0]      port_oe;
  logic [7:0]      lat [8];
  int checks = 0, failures = 0, n_in = 0, n_out = 0;
  int n_write [8];

  inputoutput dut (.CLK(clk), .RST(rst), .SEL(sel), .S(s), .IO(io), .E(e),
                   .d_in(d_in), .d_out(d_out), .d_drv(d_drv),
                   .port_in(port_in), .port_out(port_out), .port_oe(port_oe));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk();
    logic dir;
    for (int k = 0; k < 8; k++) begin
      dir = io && (sel == k);
      checks++;
      if (port_out[k] !== (dir ? 8'h00 : lat[k]) || port_oe[k] !== !dir) begin
        failures++; $display("FAIL port %0d out=%h oe=%b lat=%h", k, port_out[k], port_oe[k], lat[k]);
      end
    end
    checks++;
    if (d_out !== ((e && io) ? lat[sel] : 8'h00) || d_drv !== e) begin
      failures++; $display("FAIL bus d_out=%h drv=%b", d_out, d_drv);
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++) begin lat[k] = 0; n_write[k] = 0; end
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk) begin
        sel = 3'($urandom); s = 1'($urandom); io = 1'($urandom); e = 1'($urandom);
        d_in = 8'($urandom);
        for (int k = 0; k < 8; k++) port_in[k] = 8'($urandom);
      end
      #1 chk();
      @(posedge clk);
      if (s) begin
        lat[sel] = io ? port_in[sel] : (e ? 8'h00 : d_in);
        n_write[sel]++;
        if (io) n_in++; else n_out++;
      end
      #1 chk();
    end
    checks++; if (n_in == 0 || n_out == 0) failures++;
    for (int k = 0; k < 8; k++) begin checks++; if (n_write[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
