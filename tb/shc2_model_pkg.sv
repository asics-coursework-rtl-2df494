// shc2_model_pkg: instruction-level reference model of the single-
// accumulator CPU, for testbenches only.
//
// State: PC, IR, ACC, MDR and the output port. step() executes the
// instruction in IR, fetches the next opcode, and returns the number of
// clocks the hardware should take: 10 for an immediate operation (low
// nibble 3), 6 for output (2) and jump (1), 3 for the other opcodes, which
// only fetch. reset_fetch() models the power-up fetch (3 clocks). The ALU
// is the one of shc3_model_pkg. The timing follows the design's
// micro-program tables; the model itself is this bench's own.
package shc2_model_pkg;
  import shc3_model_pkg::*;

  class shc2_model;
    logic [7:0] rom [256];
    logic [7:0] pc, ir, acc, mdr, port;
    int n_imm = 0, n_out = 0, n_jmp = 0, n_nop = 0;
    int n_fn_imm [16];
    int n_fn_out [16];

    function new();
      pc = 0; ir = 0; acc = 0; mdr = 0; port = 0;
      for (int k = 0; k < 256; k++) rom[k] = 0;
      for (int k = 0; k < 16; k++) begin n_fn_imm[k] = 0; n_fn_out[k] = 0; end
    endfunction

    function void fetch();
      ir = rom[pc];
      pc++;
    endfunction

    function int reset_fetch();
      pc = 0;
      fetch();
      return 3;
    endfunction

    function int step();
      logic [3:0] fn;
      fn = ir[7:4];
      case (ir[3:0])
        4'h1: begin
          pc = rom[pc];
          n_jmp++;
          fetch();
          return 6;
        end
        4'h2: begin
          port = shc3_model::alu(fn, acc, mdr);
          n_out++; n_fn_out[fn]++;
          fetch();
          return 6;
        end
        4'h3: begin
          mdr = rom[pc];
          pc++;
          acc = shc3_model::alu(fn, acc, mdr);
          n_imm++; n_fn_imm[fn]++;
          fetch();
          return 10;
        end
        default: begin
          n_nop++;
          fetch();
          return 3;
        end
      endcase
    endfunction
  endclass
endpackage
