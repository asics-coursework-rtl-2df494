// ucode2_rom: one 256 x 8 slice of the single-accumulator CPU's microcode.
//
// Two slices share the address {opcode[3:0], micro-step[3:0]}: SLICE 0
// holds control bits 7:0 (ROME, PCE, PCI, RESE, SEL S, UPCCL) and SLICE 1
// bits 15:8 (RAM controls and spare lines). The contents are computed at
// elaboration from shc2_pkg::ucode2_word, so the ROM is a constant table
// read combinationally. Splitting the word into 8-bit ROMs follows the
// design; computing the contents is this design's choice.
module ucode2_rom
  import shc2_pkg::*;
#(
  parameter int SLICE = 0
) (
  input  logic [7:0] addr,
  output logic [7:0] q
);
  typedef logic [7:0] rom_t [256];

  function automatic rom_t build();
    rom_t      r;
    cu2_word_t w;
    for (int a = 0; a < 256; a++) begin
      w    = ucode2_word(8'(a));
      r[a] = w[8*SLICE +: 8];
    end
    return r;
  endfunction

  localparam rom_t ROM = build();

  always_comb q = ROM[addr];
endmodule
