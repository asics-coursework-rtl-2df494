// shc3_model_pkg: instruction-level reference model of the 8-bit CPU, for
// testbenches only.
//
// It holds the architectural state (PC, IR, accumulators A..H, port
// latches) and executes one instruction per call of step(), returning the
// number of clock cycles the hardware needs for it (the fetch of the next
// opcode included): 10 for an immediate, 6 for OUT, IN and JMP, 3 for the
// opcodes with no micro-program (0, E, F). The ALU is written here from
// the function table, independently of the RTL. Counters record which
// kinds of instruction ran.
// The behaviour checked is the design's; the random stimulus, the
// reference model and the run lengths are this bench's choice.
package shc3_model_pkg;

class shc3_model;
  logic [7:0] rom [256];
  logic [7:0] acc [8];
  logic [7:0] port [8];
  logic [7:0] pc, ir;
  int         n_imm, n_out, n_in, n_jmp, n_nop;
  int         n_fn [16];
  int         n_outport [8];

  function new();
    for (int k = 0; k < 256; k++) rom[k] = 8'h00;
    for (int k = 0; k < 8; k++) begin acc[k] = 0; port[k] = 0; n_outport[k] = 0; end
    for (int k = 0; k < 16; k++) n_fn[k] = 0;
    n_imm = 0; n_out = 0; n_in = 0; n_jmp = 0; n_nop = 0;
    pc = 0; ir = 0;
  endfunction

  static function logic [7:0] alu(logic [3:0] f, logic [7:0] x, logic [7:0] y);
    case (f)
      4'h0: return x;          4'h1: return y;
      4'h2: return ~x;         4'h3: return ~y;
      4'h4: return x & y;      4'h5: return x | y;
      4'h6: return x ^ y;      4'h7: return x + 8'd1;
      4'h8: return x + y;      4'h9: return x + y + 8'd1;
      4'hA: return x - y;      4'hB: return y - x;
      4'hC: return x - 8'd1;   4'hD: return y - 8'd1;
      default: return x;
    endcase
  endfunction

  // power-up: fetch the opcode at address 0 (3 cycles)
  function int reset_fetch();
    ir = rom[0];
    pc = 8'd1;
    return 3;
  endfunction

  // execute the instruction in ir; pins = value on port A's pins
  function int step(logic [7:0] pins);
    logic [3:0] lo, fn;
    int         cyc, src, prt;
    lo = ir[3:0];
    fn = ir[7:4];
    case (lo)
      4'h1: begin
        pc  = rom[pc];
        cyc = 6; n_jmp++;
      end
      4'h3, 4'h4, 4'h5, 4'h6: begin
        acc[7] = rom[pc];
        pc++;
        acc[lo-3] = alu(fn, acc[lo-3], acc[7]);
        cyc = 10; n_imm++; n_fn[fn]++;
      end
      4'h2, 4'h7, 4'h8, 4'h9, 4'hA, 4'hB, 4'hC: begin
        case (lo)
          4'h2: begin src = 0; prt = 0; end
          4'h7: begin src = 1; prt = 1; end
          4'h8: begin src = 2; prt = 2; end
          4'h9: begin src = 3; prt = 3; end
          4'hA: begin src = 1; prt = 0; end
          4'hB: begin src = 2; prt = 0; end
          default: begin src = 3; prt = 0; end
        endcase
        port[prt] = alu(fn, acc[src], acc[7]);
        cyc = 6; n_out++; n_fn[fn]++; n_outport[prt]++;
      end
      4'hD: begin
        acc[0]  = pins;
        port[0] = pins;
        cyc = 6; n_in++;
      end
      default: begin cyc = 3; n_nop++; end
    endcase
    ir = rom[pc];
    pc++;
    return cyc;
  endfunction
endclass

endpackage
