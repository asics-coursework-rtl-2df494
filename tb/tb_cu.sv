// tb_cu: self-checking test of the control unit (IR, micro-step counter,
// microcode ROM, strobe decoder).
// The bench plays the memory: it keeps a random opcode on the data bus and
// replaces it after each IR load. It checks that the first IR load comes 3
// clocks after reset, that each opcode then runs for exactly its expected
// number of clocks (3, 6 or 10) before the next IR load, that the step
// counter runs 0,1,2,... within a micro-program, that FN is the opcode's
// upper nibble and that the strobe outputs are the one-hot decode of the
// SEL S field (none for code 0).
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_cu;
  import shc_pkg::*;
  logic        clk = 0, rst = 1;
  logic [7:0]  d_in = 0, s, ir;
  logic [23:0] cu_w;
  logic [3:0]  fn, step;
  cu_word_t    w;
  int checks = 0, failures = 0;
  int n_op [16];

  cu dut (.CLK(clk), .RST(rst), .d_in(d_in), .CU(cu_w), .S(s), .FN(fn), .ir(ir), .step(step));
  always #5 clk = ~clk;
  assign w = cu_word_t'(cu_w);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int length(logic [3:0] op);
    case (op)
      4'h1, 4'h2, 4'h7, 4'h8, 4'h9, 4'hA, 4'hB, 4'hC, 4'hD: return CYC_OUT;
      4'h3, 4'h4, 4'h5, 4'h6:                              return CYC_IMM;
      default:                                             return CYC_FETCH;
    endcase
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int len, cyc;
    logic [7:0] op;
    for (int k = 0; k < 16; k++) n_op[k] = 0;
    op = 8'($urandom);
    d_in = op;
    @(negedge clk) rst = 0;
    len = CYC_FETCH;
    for (int n = 0; n < 1500; n++) begin
      cyc = 0;
      // run until the IR strobe fires, checking each step on the way
      do begin
        #1;
        chk("step", int'(step), cyc);
        chk("strobe decode", int'(s), (w.sel_s == S_NONE) ? 0 : (1 << int'(w.sel_s)));
        chk("FN", int'(fn), int'(ir[7:4]));
        @(posedge clk); cyc++;
        @(negedge clk);
      end while (ir !== op && cyc < 20);
      chk("cycles", cyc, len);
      chk("ir", int'(ir), int'(op));
      n_op[op[3:0]]++;
      len = length(op[3:0]);
      op = 8'($urandom);
      if (op == ir) op = op ^ 8'h10;   // make the next IR load visible
      d_in = op;
    end
    for (int k = 0; k < 16; k++) chk($sformatf("opcode %0d seen", k), int'(n_op[k] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
