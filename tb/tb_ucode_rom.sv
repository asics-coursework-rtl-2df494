// tb_ucode_rom: self-checking test of the three 8-bit microcode ROM slices.
// Instantiates slices 0-2, concatenates them to the 24-bit control word and
// checks (a) a set of words worked out by hand from the micro-program
// tables (fetch, JMP, ADDA #, OUTB and INA steps) and (b) rules every
// micro-program must obey: each opcode's last step (3, 6 or 10 clocks)
// has UPCCL set and no earlier step does, RAM_WE is never set, and at most
// one of ROME, RESE and PortE drives the data bus in any step.
// The ROM is combinational; each address is checked 1 time unit after it
// is applied.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
module tb_ucode_rom;
  logic [7:0]  addr;
  logic [7:0]  q0, q1, q2;
  logic [23:0] w;
  int checks = 0, failures = 0;

  ucode_rom #(.SLICE(0)) u0 (.addr(addr), .q(q0));
  ucode_rom #(.SLICE(1)) u1 (.addr(addr), .q(q1));
  ucode_rom #(.SLICE(2)) u2 (.addr(addr), .q(q2));
  assign w = {q2, q1, q0};

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_word(logic [7:0] a, logic [23:0] e);
    addr = a; #1 checks++;
    if (w !== e) begin failures++; $display("FAIL addr %h word %h expected %h", a, w, e); end
  endtask

  function automatic int length(logic [3:0] op);
    case (op)
      4'h1, 4'h2, 4'h7, 4'h8, 4'h9, 4'hA, 4'hB, 4'hC, 4'hD: return 6;
      4'h3, 4'h4, 4'h5, 4'h6:                              return 10;
      default:                                             return 3;
    endcase
  endfunction

  initial begin
    // bit map: [23:21] SB [20:18] SA [17:15] SW [14:12] port [11] PortE
    // [10] IO [9] RAM_OUTE [8] RAM_WE [7] ROME [6] PCE [5] PCI [4] RESE
    // [3:1] SEL S [0] UPCCL
    expect_word(8'h00, 24'h000000);   // fetch: PC on address bus
    expect_word(8'h01, 24'h000080);   // fetch: ROM on data bus
    expect_word(8'h02, 24'h0000A9);   // fetch: IR strobe, PC+1, clear uPC
    expect_word(8'h12, 24'h00008A);   // JMP: operand -> PC
    expect_word(8'h32, 24'hE380A2);   // ADDA: operand -> H, PC+1
    expect_word(8'h34, 24'hE00006);   // ADDA: ALU -> result
    expect_word(8'h36, 24'hE00012);   // ADDA: result -> A
    expect_word(8'h72, 24'hE4101E);   // OUTB: result -> port B latch
    expect_word(8'hD1, 24'h000C0E);   // INA: port A -> data bus
    expect_word(8'hD2, 24'h000C02);   // INA: data bus -> A
    for (int op = 0; op < 16; op++) begin
      for (int st = 0; st < 16; st++) begin
        addr = {4'(op), 4'(st)};
        #1 checks++;
        if (w[0] !== (st == length(4'(op)) - 1)) begin
          failures++; $display("FAIL UPCCL at op %h step %0d", op, st);
        end
        checks++;
        if (w[8] !== 1'b0 || (int'(w[7]) + int'(w[4]) + int'(w[11])) > 1) begin
          failures++; $display("FAIL bus rule at op %h step %0d", op, st);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
