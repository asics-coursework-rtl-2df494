// tb_cu1: self-checking test of the simple CPU's control unit.
// The bench plays the program ROM: it keeps a random byte on the data bus
// and changes it after each IR load. It checks every control word against
// the design's microcode tables, typed in here again as 12-bit numbers, and
// checks that the first IR load comes 3 clocks after reset, that opcodes
// 3, 2, 1 and 0 (low two bits) then run exactly 10, 6, 6 and 3 clocks, that
// the step counter counts 0, 1, 2, ..., that ir is the low two bits of the
// byte loaded, and that S is the one-hot decode of SEL S.
// The behaviour checked is the design's; the random stimulus and the run
// lengths are this bench's choice.
module tb_cu1;
  import shc1_pkg::*;
  logic        clk = 0, rst = 0;
  logic [7:0]  d_in = 0, s;
  logic [11:0] cu_w;
  logic [1:0]  ir;
  logic [3:0]  step;
  int checks = 0, failures = 0;
  int n_op [4];

  // the tables: bits ROME PCE PCI RESE | FUN | SEL S | UPCCL
  localparam logic [11:0] T_FETCH [3]  = '{12'h800, 12'h800, 12'hA09};
  localparam logic [11:0] T_JMP   [6]  = '{12'h000, 12'h800, 12'h80A, 12'h000, 12'h800, 12'hA09};
  localparam logic [11:0] T_OUT   [6]  = '{12'h006, 12'h100, 12'h10E, 12'h000, 12'h800, 12'hA09};
  localparam logic [11:0] T_ADD   [10] = '{12'h000, 12'h800, 12'hA04, 12'h080, 12'h086,
                                           12'h100, 12'h102, 12'h000, 12'h800, 12'hA09};

  cu1 dut (.CLK(clk), .RST(rst), .d_in(d_in), .CU(cu_w), .S(s), .ir(ir), .step(step));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [11:0] table_word(logic [1:0] op, int st);
    case (op)
      2'd0: return st < 3  ? T_FETCH[st] : 12'h000;
      2'd1: return st < 6  ? T_JMP[st]   : 12'h000;
      2'd2: return st < 6  ? T_OUT[st]   : 12'h000;
      default: return st < 10 ? T_ADD[st] : 12'h000;
    endcase
  endfunction

  function automatic int length(logic [1:0] op);
    case (op)
      2'd0: return 3;
      2'd3: return 10;
      default: return 6;
    endcase
  endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    int len, cyc, sel;
    logic [7:0] op;
    logic [1:0] cur;
    for (int k = 0; k < 4; k++) n_op[k] = 0;
    #1 rst = 1;
    #1 chk("ir after reset", int'(ir), 0);
    chk("step after reset", int'(step), 0);
    op = 8'($urandom);
    d_in = op;
    @(negedge clk) rst = 0;
    len = 3; cur = 2'd0;
    for (int n = 0; n < 1500; n++) begin
      cyc = 0;
      do begin
        #1;
        chk("step", int'(step), cyc);
        chk($sformatf("word op %0d step %0d", cur, cyc), int'(cu_w), int'(table_word(cur, cyc)));
        sel = int'(cu_w[3:1]);
        chk("strobe decode", int'(s), (sel == 0) ? 0 : (1 << sel));
        @(posedge clk); cyc++;
        @(negedge clk);
      end while (step != 4'd0 && cyc < 20);
      chk("cycles", cyc, len);
      chk("ir", int'(ir), int'(op[1:0]));
      n_op[op[1:0]]++;
      cur = op[1:0];
      len = length(cur);
      op = 8'($urandom);
      d_in = op;
    end
    for (int k = 0; k < 4; k++) chk($sformatf("opcode %0d seen", k), int'(n_op[k] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
