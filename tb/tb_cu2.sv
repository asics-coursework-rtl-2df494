// tb_cu2: self-checking test of the single-accumulator CPU's control unit.
// The bench plays the memory: it keeps a random opcode on the data bus and
// changes it after each IR load. It checks that the first IR load comes 3
// clocks after reset, that each opcode then runs exactly 10 (low nibble 3),
// 6 (1, 2) or 3 (others) clocks before the next IR load, that the step
// counter counts 0, 1, 2, ..., that FN is the opcode's upper nibble, and
// that S is the one-hot decode of SEL S (none for code 0).
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_cu2;
  import shc2_pkg::*;
  logic        clk = 0, rst = 1;
  logic [7:0]  d_in = 0, s, ir;
  logic [15:0] cu_w;
  logic [3:0]  fn, step;
  cu2_word_t   w;
  int checks = 0, failures = 0;
  int n_op [16];

  cu2 dut (.CLK(clk), .RST(rst), .d_in(d_in), .CU(cu_w), .S(s), .FN(fn), .ir(ir), .step(step));
  always #5 clk = ~clk;
  assign w = cu2_word_t'(cu_w);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int length(logic [3:0] op);
    case (op)
      4'h1, 4'h2: return CYC2_OUT;
      4'h3:       return CYC2_IMM;
      default:    return 3;
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
    len = 3;
    for (int n = 0; n < 1500; n++) begin
      cyc = 0;
      do begin
        #1;
        chk("step", int'(step), cyc);
        chk("strobe decode", int'(s), (w.sel_s == S2_NONE) ? 0 : (1 << int'(w.sel_s)));
        chk("FN", int'(fn), int'(ir[7:4]));
        @(posedge clk); cyc++;
        @(negedge clk);
      end while (ir !== op && cyc < 20);
      chk("cycles", cyc, len);
      n_op[op[3:0]]++;
      len = length(op[3:0]);
      // favour the opcodes that have micro-programs
      op = 8'($urandom);
      if ($urandom % 2 == 0) op[3:0] = 4'(1 + $urandom % 3);
      if (op == ir) op = op ^ 8'h10;
      d_in = op;
    end
    for (int k = 0; k < 16; k++) chk($sformatf("opcode %0d seen", k), int'(n_op[k] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
