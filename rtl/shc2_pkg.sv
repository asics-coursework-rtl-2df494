// shc2_pkg: control word, strobe numbers and microprogram of the 8-bit
// single-accumulator CPU (the "mark 2" simple hypothetical computer).
//
// The control word is 16 bits, held in two 8-bit microcode ROMs addressed
// by {opcode[3:0], micro-step[3:0]}:
//   [15:10] unused (reserved for expansion in the design)
//   [9] RAM_OUTE  RAM drives the data bus     [8] RAM_WE  RAM write
//   [7] ROME      program ROM drives the bus  [6] PCE     active low: PC on
//                                                         the address bus
//   [5] PCI       increment PC                [4] RESE    result -> data bus
//   [3:1] SEL S   one strobe, decoded          [0] UPCCL   clear micro-step
// Strobes: S1 accumulator, S2 MDR, S3 result, S4 IR, S5 PC load, S6 MAR,
// S7 output port; 0 = none.
//
// The micro-programs are the design's published tables, step by step:
// power-up fetch (opcode 0), jump (1), output (2) and immediate ALU
// operation (3). The ALU function is the opcode's upper nibble, so opcode 3
// serves LDA #, ADDA #, SUBA # and so on, and opcode 2 outputs any ALU
// function of ACC and MDR. Opcodes 4 to F have no table; this design makes
// them run the fetch alone (a 3-clock no-operation) rather than an empty
// micro-program that would never fetch again.
package shc2_pkg;

  typedef enum logic [2:0] {
    S2_NONE = 3'd0,
    S2_ACCS = 3'd1,
    S2_MDRS = 3'd2,
    S2_RESS = 3'd3,
    S2_IRS  = 3'd4,
    S2_PCS  = 3'd5,
    S2_MARS = 3'd6,
    S2_OUTS = 3'd7
  } strobe2_e;

  typedef struct packed {
    logic [5:0] spare;
    logic       ram_oute;
    logic       ram_we;
    logic       rom_e;
    logic       pce_n;
    logic       pci;
    logic       rese;
    strobe2_e   sel_s;
    logic       upccl;
  } cu2_word_t;

  localparam logic [3:0] OP2_FETCH = 4'h0, OP2_JMP = 4'h1, OP2_OUT = 4'h2,
                         OP2_IMM = 4'h3;

  // Clocks per micro-program, fetch of the next opcode included.
  localparam int CYC2_FETCH = 3, CYC2_IMM = 10, CYC2_OUT = 6, CYC2_JMP = 6;

  // Build one word from the fields the tables use.
  function automatic cu2_word_t mk(logic rome, logic pci, logic rese,
                                   strobe2_e s, logic upccl);
    cu2_word_t w;
    w       = '0;
    w.rom_e = rome;
    w.pci   = pci;
    w.rese  = rese;
    w.sel_s = s;
    w.upccl = upccl;
    return w;
  endfunction

  // Contents of the 256 x 16 microcode store, address {opcode, step}.
  function automatic cu2_word_t ucode2_word(logic [7:0] addr);
    logic [3:0] op;
    int         st;
    op = addr[7:4];
    st = int'(addr[3:0]);
    case (op)
      OP2_JMP:
        case (st)
          0: return mk(0, 0, 0, S2_NONE, 0);   // PC -> address bus
          1: return mk(1, 0, 0, S2_NONE, 0);   // operand -> data bus
          2: return mk(1, 0, 0, S2_PCS,  0);   // data bus -> PC
          3: return mk(0, 0, 0, S2_NONE, 0);   // fetch
          4: return mk(1, 0, 0, S2_NONE, 0);
          5: return mk(1, 1, 0, S2_IRS,  1);
          default: return '0;
        endcase
      OP2_OUT:
        case (st)
          0: return mk(0, 0, 0, S2_RESS, 0);   // ALU -> result register
          1: return mk(0, 0, 1, S2_NONE, 0);   // result -> data bus
          2: return mk(0, 0, 1, S2_OUTS, 0);   // data bus -> output port
          3: return mk(0, 0, 0, S2_NONE, 0);   // fetch
          4: return mk(1, 0, 0, S2_NONE, 0);
          5: return mk(1, 1, 0, S2_IRS,  1);
          default: return '0;
        endcase
      OP2_IMM:
        case (st)
          0: return mk(0, 0, 0, S2_NONE, 0);   // PC -> address bus
          1: return mk(1, 0, 0, S2_NONE, 0);   // operand -> data bus
          2: return mk(1, 1, 0, S2_MDRS, 0);   // data bus -> MDR, PC + 1
          3: return mk(0, 0, 0, S2_NONE, 0);   // ALU settles
          4: return mk(0, 0, 0, S2_RESS, 0);   // ALU -> result register
          5: return mk(0, 0, 1, S2_NONE, 0);   // result -> data bus
          6: return mk(0, 0, 1, S2_ACCS, 0);   // data bus -> ACC
          7: return mk(0, 0, 0, S2_NONE, 0);   // fetch
          8: return mk(1, 0, 0, S2_NONE, 0);
          9: return mk(1, 1, 0, S2_IRS,  1);
          default: return '0;
        endcase
      default:                                 // 0 (power-up) and 4..F
        case (st)
          0: return mk(1, 0, 0, S2_NONE, 0);
          1: return mk(1, 0, 0, S2_NONE, 0);
          2: return mk(1, 1, 0, S2_IRS,  1);
          default: return '0;
        endcase
    endcase
  endfunction

endpackage
