// shc1_pkg: control word, strobe numbers and microprogram of the 8-bit
// simple CPU (the "mark 1" simple hypothetical computer).
//
// The control word is 12 bits, held in one 64-word microcode store
// addressed by {opcode[1:0], micro-step[3:0]}:
//   [11] ROME     program ROM drives the data bus
//   [10] PCE      active low: PC on the address bus
//   [9]  PCI      increment PC
//   [8]  RESE     result register drives the data bus
//   [7:4] ALU FUN ALU function (unlike the later CPUs, set by the microcode)
//   [3:1] SEL S   one strobe, decoded
//   [0]  UPCCL    clear the micro-step counter
// Strobes: S1 accumulator, S2 MDR, S3 result, S4 IR, S5 PC load, S6 MAR
// (no MAR in this CPU), S7 output port; 0 = none.
//
// The micro-programs are the design's published tables, step by step:
// power-up fetch (opcode 0), jump immediate (1), output A (2) and add
// immediate (3). Words past the end of a table are 0; every table ends
// with UPCCL, so they are never reached.
package shc1_pkg;

  typedef enum logic [2:0] {
    S1_NONE = 3'd0,
    S1_ACCS = 3'd1,
    S1_MDRS = 3'd2,
    S1_RESS = 3'd3,
    S1_IRS  = 3'd4,
    S1_PCS  = 3'd5,
    S1_MARS = 3'd6,
    S1_OUTS = 3'd7
  } strobe1_e;

  typedef struct packed {
    logic       rom_e;
    logic       pce_n;
    logic       pci;
    logic       rese;
    logic [3:0] alu_fn;
    strobe1_e   sel_s;
    logic       upccl;
  } cu1_word_t;

  localparam logic [1:0] OP1_FETCH = 2'd0, OP1_JMP = 2'd1, OP1_OUT = 2'd2,
                         OP1_ADD = 2'd3;

  // ALU functions the tables use: pass operand 1, operand 1 + operand 2.
  localparam logic [3:0] FN1_PASS = 4'b0000, FN1_ADD = 4'b1000;

  // Clocks per micro-program, fetch of the next opcode included.
  localparam int CYC1_FETCH = 3, CYC1_ADD = 10, CYC1_OUT = 6, CYC1_JMP = 6;

  // Build one word from the fields the tables use (PCE is always 0).
  function automatic cu1_word_t mk(logic rome, logic pci, logic rese,
                                   logic [3:0] fn, strobe1_e s, logic upccl);
    cu1_word_t w;
    w        = '0;
    w.rom_e  = rome;
    w.pci    = pci;
    w.rese   = rese;
    w.alu_fn = fn;
    w.sel_s  = s;
    w.upccl  = upccl;
    return w;
  endfunction

  // Contents of the 64 x 12 microcode store, address {opcode, step}.
  function automatic cu1_word_t ucode1_word(logic [5:0] addr);
    int st;
    st = int'(addr[3:0]);
    case (addr[5:4])
      OP1_FETCH:
        case (st)
          0: return mk(1, 0, 0, FN1_PASS, S1_NONE, 0);  // PC -> AB, ROM early
          1: return mk(1, 0, 0, FN1_PASS, S1_NONE, 0);  // ROM -> data bus
          2: return mk(1, 1, 0, FN1_PASS, S1_IRS,  1);  // IR, PC + 1, new op
          default: return '0;
        endcase
      OP1_JMP:
        case (st)
          0: return mk(0, 0, 0, FN1_PASS, S1_NONE, 0);  // PC -> AB
          1: return mk(1, 0, 0, FN1_PASS, S1_NONE, 0);  // operand -> bus
          2: return mk(1, 0, 0, FN1_PASS, S1_PCS,  0);  // bus -> PC
          3: return mk(0, 0, 0, FN1_PASS, S1_NONE, 0);  // fetch
          4: return mk(1, 0, 0, FN1_PASS, S1_NONE, 0);
          5: return mk(1, 1, 0, FN1_PASS, S1_IRS,  1);
          default: return '0;
        endcase
      OP1_OUT:
        case (st)
          0: return mk(0, 0, 0, FN1_PASS, S1_RESS, 0);  // ACC -> result
          1: return mk(0, 0, 1, FN1_PASS, S1_NONE, 0);  // result -> bus
          2: return mk(0, 0, 1, FN1_PASS, S1_OUTS, 0);  // bus -> port
          3: return mk(0, 0, 0, FN1_PASS, S1_NONE, 0);  // fetch
          4: return mk(1, 0, 0, FN1_PASS, S1_NONE, 0);
          5: return mk(1, 1, 0, FN1_PASS, S1_IRS,  1);
          default: return '0;
        endcase
      default:                                          // OP1_ADD
        case (st)
          0: return mk(0, 0, 0, FN1_PASS, S1_NONE, 0);  // PC -> AB
          1: return mk(1, 0, 0, FN1_PASS, S1_NONE, 0);  // operand -> bus
          2: return mk(1, 1, 0, FN1_PASS, S1_MDRS, 0);  // bus -> MDR, PC + 1
          3: return mk(0, 0, 0, FN1_ADD,  S1_NONE, 0);  // ACC + MDR
          4: return mk(0, 0, 0, FN1_ADD,  S1_RESS, 0);  // -> result register
          5: return mk(0, 0, 1, FN1_PASS, S1_NONE, 0);  // result -> bus
          6: return mk(0, 0, 1, FN1_PASS, S1_ACCS, 0);  // bus -> ACC
          7: return mk(0, 0, 0, FN1_PASS, S1_NONE, 0);  // fetch
          8: return mk(1, 0, 0, FN1_PASS, S1_NONE, 0);
          9: return mk(1, 1, 0, FN1_PASS, S1_IRS,  1);
          default: return '0;
        endcase
    endcase
  endfunction

endpackage
