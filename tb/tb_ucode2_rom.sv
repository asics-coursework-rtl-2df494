// tb_ucode2_rom: self-checking test of the two microcode ROM slices of the
// single-accumulator CPU.
// The 16-bit word {slice 1, slice 0} is compared with every row of the
// design's published micro-program tables (power-up fetch, jump, output,
// immediate), typed in here as {ROME, PCE, PCI, RESE, SEL S, UPCCL}. Then
// rules for all 256 addresses: UPCCL is set in exactly the last step of
// each opcode (3, 6 or 10 clocks), the RAM and spare bits are never set,
// and ROME and RESE are never on together. Combinational; each address is
// checked 1 time unit after it is applied.
// The table rows come from the design; the rule checks and the treatment
// of opcodes without a table (fetch only) are this bench's choice.
module tb_ucode2_rom;
  logic [7:0]  addr;
  logic [7:0]  q0, q1;
  logic [15:0] w;
  int checks = 0, failures = 0;

  ucode2_rom #(.SLICE(0)) u0 (.addr(addr), .q(q0));
  ucode2_rom #(.SLICE(1)) u1 (.addr(addr), .q(q1));
  assign w = {q1, q0};

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // rome, pce, pci, rese, sel s (3 bits), upccl
  task automatic row(logic [7:0] a, logic rome, logic pce, logic pci, logic rese,
                     logic [2:0] sel, logic upccl);
    addr = a; #1 checks++;
    if (w !== {8'h00, rome, pce, pci, rese, sel, upccl}) begin
      failures++; $display("FAIL addr %h word %h", a, w);
    end
  endtask

  function automatic int length(logic [3:0] op);
    case (op)
      4'h1, 4'h2: return 6;
      4'h3:       return 10;
      default:    return 3;
    endcase
  endfunction

  initial begin
    row(8'h00, 1, 0, 0, 0, 3'b000, 0);
    row(8'h01, 1, 0, 0, 0, 3'b000, 0);
    row(8'h02, 1, 0, 1, 0, 3'b100, 1);
    row(8'h30, 0, 0, 0, 0, 3'b000, 0);
    row(8'h31, 1, 0, 0, 0, 3'b000, 0);
    row(8'h32, 1, 0, 1, 0, 3'b010, 0);
    row(8'h33, 0, 0, 0, 0, 3'b000, 0);
    row(8'h34, 0, 0, 0, 0, 3'b011, 0);
    row(8'h35, 0, 0, 0, 1, 3'b000, 0);
    row(8'h36, 0, 0, 0, 1, 3'b001, 0);
    row(8'h37, 0, 0, 0, 0, 3'b000, 0);
    row(8'h38, 1, 0, 0, 0, 3'b000, 0);
    row(8'h39, 1, 0, 1, 0, 3'b100, 1);
    row(8'h20, 0, 0, 0, 0, 3'b011, 0);
    row(8'h21, 0, 0, 0, 1, 3'b000, 0);
    row(8'h22, 0, 0, 0, 1, 3'b111, 0);
    row(8'h23, 0, 0, 0, 0, 3'b000, 0);
    row(8'h24, 1, 0, 0, 0, 3'b000, 0);
    row(8'h25, 1, 0, 1, 0, 3'b100, 1);
    row(8'h10, 0, 0, 0, 0, 3'b000, 0);
    row(8'h11, 1, 0, 0, 0, 3'b000, 0);
    row(8'h12, 1, 0, 0, 0, 3'b101, 0);
    row(8'h13, 0, 0, 0, 0, 3'b000, 0);
    row(8'h14, 1, 0, 0, 0, 3'b000, 0);
    row(8'h15, 1, 0, 1, 0, 3'b100, 1);
    for (int op = 0; op < 16; op++)
      for (int st = 0; st < 16; st++) begin
        addr = {4'(op), 4'(st)};
        #1 checks++;
        if (w[0] !== (st == length(4'(op)) - 1)) begin
          failures++; $display("FAIL UPCCL at op %h step %0d", op, st);
        end
        checks++;
        if (w[15:8] !== 8'h00 || (w[7] && w[4])) begin
          failures++; $display("FAIL rule at op %h step %0d", op, st);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
