// tb_shc1_top: runs the simple CPU against an instruction-level model.
//
// Three instances run three 8-byte programs: the built-in one (add 1,
// output, jump to 0), tb/prog1_add8.hex (the same with add 8) and
// tb/prog1_mix.hex (add 5, output, add -3, output, jump back to 2). For
// each, the bench reads the same image into its own model and steps it one
// instruction per IR load. At every IR load it checks that the instruction
// just finished took exactly the clocks it should (3 for the power-up
// fetch, 10 for add, 6 for output and jump), and compares PC, ACC, the
// output port and the opcode fetched. Reset is pulsed again at random times,
// for a random number of clocks, and the model restarts with it. The port
// values of the built-in program must be 1, 2, 3, ... 22 clocks apart, and
// every strobe the microcode uses (S1, S2, S3, S4, S5, S7) must be seen.
// The programs of tests 1 and 2 and their results are the design's; the
// model, the third program, the reset pulses and the run lengths are this
// bench's choice.
module tb_shc1_top;
  import shc1_pkg::*;

  localparam int NINST = 3;
  localparam int NCYC  = 6000;

  logic clk = 1'b0;
  logic rst [NINST];
  int checks = 0, failures = 0;
  int n_strobe [8];

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 500) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic string prog_file(int k);
    case (k)
      0: return "rtl/shc1_prog.hex";
      1: return "tb/prog1_add8.hex";
      default: return "tb/prog1_mix.hex";
    endcase
  endfunction

  initial for (int k = 0; k < 8; k++) n_strobe[k] = 0;

  int done = 0;

  // port changes of the built-in program
  int         n_chg = 0, t_chg = 0, cyc0 = 0;
  logic [7:0] prev0 = 8'h00;

  for (genvar g = 0; g < NINST; g++) begin : g_cpu
    logic [11:0] cu_w;
    logic [7:0]  prog, port, s;
    logic [2:0]  ab;
    logic [7:0]  img [8];

    shc1_top #(.PROG_FILE(prog_file(g))) u_cpu (
      .CLK(clk), .RESET(rst[g]), .CU(cu_w), .PROG(prog), .AB(ab),
      .portaOP(port), .S(s)
    );

    if (g == 0) begin : g_count
      always @(posedge clk) if (!rst[0]) begin
        for (int k = 0; k < 8; k++) if (s[k]) n_strobe[k]++;
        cyc0 <= cyc0 + 1;
      end
      always @(negedge clk) if (!rst[0] && port != prev0) begin
        if (n_chg > 0) chk("clocks between port changes", cyc0 - t_chg, 22);
        chk("port value", int'(port), int'(8'(prev0 + 8'd1)));
        prev0 <= port;
        t_chg <= cyc0;
        n_chg++;
      end
    end

    initial begin
      logic [7:0] pc, acc, out, op, opnd;
      int len, cyc, gap;
      $readmemh(prog_file(g), img);
      rst[g] = 1'b0;
      #1 rst[g] = 1'b1;
      #1 chk("port after reset", int'(port), 0);
      chk("PC after reset", int'(u_cpu.pc_q), 0);
      repeat (1 + $urandom % 3) @(negedge clk);
      rst[g] = 1'b0;
      pc = 0; acc = 0; out = 0; op = 0; len = 3; cyc = 0;
      gap = 200 + int'($urandom % 800);
      while (cyc < NCYC) begin
        // mid-run reset: restart the model
        if (g != 0 && cyc > gap) begin
          @(negedge clk) rst[g] = 1'b1;
          repeat (1 + $urandom % 4) @(negedge clk);
          chk("ACC held in reset", int'(u_cpu.acc_q), 0);
          rst[g] = 1'b0;
          pc = 0; acc = 0; out = 0; op = 0; len = 3;
          gap = cyc + 200 + int'($urandom % 800);
        end
        // wait for the IR load that ends this instruction
        begin
          int n;
          n = 0;
          do begin
            @(posedge clk); n++; cyc++;
          end while (!s[S1_IRS] && n < 20);
          chk($sformatf("cpu %0d clocks of opcode %0d", g, op[1:0]), n, len);
        end
        // the model runs the instruction that just finished, then fetches
        case (op[1:0])
          2'd3: begin opnd = img[pc[2:0]]; pc++; acc = acc + opnd; end
          2'd2: out = acc;
          2'd1: pc = img[pc[2:0]];
          default: ;
        endcase
        op = img[pc[2:0]];
        pc++;
        case (op[1:0])
          2'd0: len = 3;
          2'd3: len = 10;
          default: len = 6;
        endcase
        @(negedge clk);
        chk($sformatf("cpu %0d IR", g), int'(u_cpu.ir), int'(op[1:0]));
        chk($sformatf("cpu %0d PC", g), int'(u_cpu.pc_q), int'(pc));
        chk($sformatf("cpu %0d ACC", g), int'(u_cpu.acc_q), int'(acc));
        chk($sformatf("cpu %0d port", g), int'(port), int'(out));
      end
      done++;
    end
  end

  initial begin
    wait (done == NINST);
    chk("port changes seen", int'(n_chg > 100), 1);
    for (int k = 1; k < 8; k++)
      if (k != int'(S1_MARS)) chk($sformatf("strobe S%0d seen", k), int'(n_strobe[k] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
