// ucode_rom: one 256 x 8 slice of the microcode store.
//
// The 24-bit control word is kept in three 8-bit ROMs that share one
// address, {opcode[3:0], micro-step[3:0]}: SLICE 0 holds bits 7:0 (PC,
// ROM, result-enable, strobe select and micro-step clear), SLICE 1 bits
// 15:8 (RAM, I/O port and accumulator-write select), SLICE 2 bits 23:16
// (accumulator selects). The contents are computed by
// shc_pkg::ucode_word, which lays out the micro-programs step by step,
// into a constant table. Reads are combinational.
//
// Interface: addr[7:0], q[7:0]. Parameter SLICE (0..2).
module ucode_rom
  import shc_pkg::*;
#(
  parameter int SLICE = 0
) (
  input  logic [7:0] addr,
  output logic [7:0] q
);
  typedef logic [7:0] rom_t [256];

  function automatic rom_t build();
    rom_t     r;
    cu_word_t w;
    for (int a = 0; a < 256; a++) begin
      w    = ucode_word(8'(a));
      r[a] = w[8*SLICE +: 8];
    end
    return r;
  endfunction

  localparam rom_t ROM = build();

  always_comb q = ROM[addr];
endmodule
