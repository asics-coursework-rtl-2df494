// shc_pkg: types, constants and the microprogram shared by the 8-bit
// microcoded CPU (the "mark 3" simple hypothetical computer).
//
// The CPU is a single-bus von Neumann machine: every transfer between the
// program ROM, RAM, the result register, the accumulators and the I/O ports
// goes over one 8-bit data bus, one transfer per clock. A 24-bit horizontal
// control word, read from three 8-bit microcode ROMs addressed by
// {opcode[3:0], micro-step[3:0]}, says in each cycle which unit drives the
// bus and which register strobes it in.
//
// Control word layout (bit numbers are those of the design):
//   [23:21] SB  accumulator on ALU operand 2     [20:18] SA  accumulator on operand 1
//   [17:15] SW  accumulator written by strobe S1  [14:12] port select (0 = A ... 7 = H)
//   [11]    PortE  selected port drives the bus   [10]    Port_IO (0 output, 1 input)
//   [9]     RAM_OUTE  RAM drives the bus          [8]     RAM_WE
//   [7]     ROME   program ROM drives the bus     [6]     PCE, active low: PC drives
//                                                         the address bus (else MAR)
//   [5]     PCI    increment PC                   [4]     RESE result register drives bus
//   [3:1]   SEL S  one strobe, decoded 3-to-8     [0]     UPCCL clear the micro-step counter
//
// Strobes: S1 register-bank write, S3 result register, S4 instruction
// register, S5 PC load, S6 MAR load, S7 I/O port latch. S0 and S2 are unused.
//
// The microprogram follows the design's published microcode tables. Where
// a table row is ambiguous this package takes the pattern the other rows use
// (see ucode_word). Opcodes 0, E and F run the bare fetch sequence.
package shc_pkg;

  typedef logic [7:0] byte_t;

  // 8-bit ALU functions (operation code = upper nibble of the opcode byte)
  typedef enum logic [3:0] {
    ALU_OP1      = 4'h0,
    ALU_OP2      = 4'h1,
    ALU_NOT_OP1  = 4'h2,
    ALU_NOT_OP2  = 4'h3,
    ALU_AND      = 4'h4,
    ALU_OR       = 4'h5,
    ALU_XOR      = 4'h6,
    ALU_INC_OP1  = 4'h7,
    ALU_ADD      = 4'h8,
    ALU_ADD_INC  = 4'h9,
    ALU_SUB      = 4'hA,
    ALU_RSUB     = 4'hB,
    ALU_DEC_OP1  = 4'hC,
    ALU_DEC_OP2  = 4'hD
  } alu_fn_e;

  // Decoded strobe numbers (SEL S field)
  typedef enum logic [2:0] {
    S_NONE = 3'd0,
    S_RBS  = 3'd1,   // register bank (accumulator) strobe
    S_UNUSED2 = 3'd2,
    S_RESS = 3'd3,   // result register
    S_IRS  = 3'd4,   // instruction register
    S_PCS  = 3'd5,   // program counter load
    S_MARS = 3'd6,   // memory address register
    S_OUTS = 3'd7    // I/O port latch
  } strobe_e;

  // Accumulator numbers; H holds the immediate operand
  localparam logic [2:0] ACC_A = 3'd0, ACC_B = 3'd1, ACC_C = 3'd2, ACC_D = 3'd3,
                         ACC_H = 3'd7;

  // Micro-program numbers (lower nibble of the opcode byte)
  localparam logic [3:0] OP_FETCH = 4'h0, OP_JMP = 4'h1, OP_OUTA_A = 4'h2,
                         OP_ACCA_IMM = 4'h3, OP_ACCB_IMM = 4'h4,
                         OP_ACCC_IMM = 4'h5, OP_ACCD_IMM = 4'h6,
                         OP_OUTB_B = 4'h7, OP_OUTC_C = 4'h8, OP_OUTD_D = 4'h9,
                         OP_OUTA_B = 4'hA, OP_OUTA_C = 4'hB, OP_OUTA_D = 4'hC,
                         OP_INA_A = 4'hD;

  typedef struct packed {
    logic [2:0] sb;
    logic [2:0] sa;
    logic [2:0] sw;
    logic [2:0] port_sel;
    logic       port_e;
    logic       port_io;
    logic       ram_oute;
    logic       ram_we;
    logic       rom_e;
    logic       pce_n;
    logic       pci;
    logic       rese;
    strobe_e    sel_s;
    logic       upccl;
  } cu_word_t;

  // Number of clock cycles each micro-program takes, fetch of the next
  // opcode included (used by testbenches and documentation).
  localparam int CYC_FETCH = 3, CYC_IMM = 10, CYC_OUT = 6, CYC_JMP = 6, CYC_IN = 6;

  // Three-step opcode fetch that closes every micro-program: put PC on the
  // address bus, read the ROM, then strobe the IR, step the PC and restart
  // the micro-step counter at 0 of the new opcode's micro-program.
  function automatic cu_word_t fetch_step(cu_word_t base, int k);
    cu_word_t w;
    w = base;
    case (k)
      0: ;
      1: w.rom_e = 1'b1;
      default: begin
        w.rom_e = 1'b1;
        w.pci   = 1'b1;
        w.sel_s = S_IRS;
        w.upccl = 1'b1;
      end
    endcase
    return w;
  endfunction

  // Contents of the 256 x 24 microcode store, address {opcode, step}.
  function automatic cu_word_t ucode_word(logic [7:0] addr);
    cu_word_t   w, base;
    logic [3:0] op;
    int         st;
    logic [2:0] acc;
    op   = addr[7:4];
    st   = int'(addr[3:0]);
    base = '0;                      // PCE = 0: PC drives the address bus
    w    = base;
    case (op)
      OP_JMP: begin
        case (st)
          0: ;
          1: w.rom_e = 1'b1;                                 // operand -> DB
          2: begin w.rom_e = 1'b1; w.sel_s = S_PCS; end      // DB -> PC
          3, 4, 5: w = fetch_step(base, st - 3);
          default: ;
        endcase
      end
      OP_ACCA_IMM, OP_ACCB_IMM, OP_ACCC_IMM, OP_ACCD_IMM: begin
        acc      = 3'(op - OP_ACCA_IMM);
        base.sb  = ACC_H;
        base.sa  = acc;
        base.sw  = ACC_H;
        w        = base;
        case (st)
          0: ;
          1: w.rom_e = 1'b1;
          2: begin w.rom_e = 1'b1; w.pci = 1'b1; w.sel_s = S_RBS; end  // operand -> H
          3: ;                                                         // ALU settles
          4: begin w.sw = acc; w.sel_s = S_RESS; end                   // ALU -> RESULT
          5: begin w.sw = acc; w.rese = 1'b1; end                      // RESULT -> DB
          6: begin w.sw = acc; w.rese = 1'b1; w.sel_s = S_RBS; end     // DB -> acc
          7, 8, 9: w = fetch_step(base, st - 7);
          default: ;
        endcase
      end
      OP_OUTA_A, OP_OUTB_B, OP_OUTC_C, OP_OUTD_D,
      OP_OUTA_B, OP_OUTA_C, OP_OUTA_D: begin
        case (op)
          OP_OUTA_A: begin base.sa = ACC_A; base.port_sel = 3'd0; end
          OP_OUTB_B: begin base.sa = ACC_B; base.port_sel = 3'd1; end
          OP_OUTC_C: begin base.sa = ACC_C; base.port_sel = 3'd2; end
          OP_OUTD_D: begin base.sa = ACC_D; base.port_sel = 3'd3; end
          OP_OUTA_B: begin base.sa = ACC_B; base.port_sel = 3'd0; end
          OP_OUTA_C: begin base.sa = ACC_C; base.port_sel = 3'd0; end
          default:   begin base.sa = ACC_D; base.port_sel = 3'd0; end
        endcase
        base.sb = ACC_H;
        w       = base;
        case (st)
          0: w.sel_s = S_RESS;                               // ALU -> RESULT
          1: w.rese  = 1'b1;                                 // RESULT -> DB
          2: begin w.rese = 1'b1; w.sel_s = S_OUTS; end      // DB -> port latch
          3, 4, 5: w = fetch_step(base, st - 3);
          default: ;
        endcase
      end
      OP_INA_A: begin
        base.sw       = ACC_A;
        base.port_sel = 3'd0;
        w             = base;
        case (st)
          0: begin w.port_io = 1'b1; w.sel_s = S_OUTS; end               // pins -> latch
          1: begin w.port_io = 1'b1; w.port_e = 1'b1; w.sel_s = S_OUTS; end // latch -> DB
          2: begin w.port_io = 1'b1; w.port_e = 1'b1; w.sel_s = S_RBS; end  // DB -> A
          3, 4, 5: w = fetch_step(base, st - 3);
          default: ;
        endcase
      end
      default: begin                                  // 0, E, F: fetch only
        if (st <= 2) w = fetch_step(base, st);
      end
    endcase
    return w;
  endfunction

endpackage
