// tb_alu: self-checking test of the 8-bit, 14-function ALU.
// First the design's published table (op1 = 0x24, op2 = 0x12, every
// function code), then random operands and codes against the independent
// model in shc3_model_pkg. Codes 14 and 15 are unused and must pass op1.
// Purely combinational: results are checked 1 time unit after the inputs.
// The published test values come from the design's own tests; the random
// stimulus, the reference model and the run lengths are this bench's choice.
module tb_alu;
  import shc3_model_pkg::*;
  logic [7:0] op1, op2, result;
  logic [3:0] fn;
  logic [7:0] table_exp [14];
  int checks = 0, failures = 0;

  alu dut (.op1(op1), .op2(op2), .alu_fn(fn), .result(result));

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    table_exp = '{8'h24, 8'h12, 8'hDB, 8'hED, 8'h00, 8'h36, 8'h36,
                  8'h25, 8'h36, 8'h37, 8'h12, 8'hEE, 8'h23, 8'h11};
    op1 = 8'h24; op2 = 8'h12;
    for (int f = 0; f < 14; f++) begin
      fn = 4'(f); #1 checks++;
      if (result !== table_exp[f]) begin
        failures++; $display("FAIL table fn=%0d got %h expected %h", f, result, table_exp[f]);
      end
    end
    for (int n = 0; n < 4000; n++) begin
      op1 = 8'($urandom); op2 = 8'($urandom); fn = 4'($urandom);
      #1 checks++;
      if (result !== shc3_model::alu(fn, op1, op2)) begin
        failures++; $display("FAIL fn=%0d %h %h got %h", fn, op1, op2, result);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
