// memory: program counter, memory address register, program ROM and RAM.
//
// The 8-bit address bus carries the PC while PCE (active low) is 0 and
// the MAR otherwise. The PC steps on PCI and loads the data bus on strobe
// S5 (jumps); the MAR loads the data bus on strobe S6. The program ROM
// drives the data bus while ROME is high; the RAM drives it while RAM_OUTE
// is high and writes the data bus value at the addressed byte on a clock
// edge while RAM_WE is high. ROM and RAM each decode the full address bus,
// so the control lines, not the address, choose between them.
// The ROM is read combinationally (its value is on the bus in the cycle
// ROME is high) and is loaded at start-up from the hex file PROG_FILE.
//
// Interface: CLK, RST (active high); d_in (data bus value), d_out/d_drv
// (drive onto the data bus); CU[9:5] = {RAM_OUTE, RAM_WE, ROME, PCE, PCI};
// S5, S6; address[7:0]. The block's contents follow the design. The sizes
// (256 bytes each, the reach of the 8-bit address bus), the RAM's write
// timing and the MAR-on-address-bus rule are this design's choices.
module memory #(
  parameter string PROG_FILE = "rtl/shc3_prog.hex"
) (
  input  logic              CLK,
  input  logic              RST,
  input  logic [7:0]        d_in,
  output logic [7:0]        d_out,
  output logic              d_drv,
  input  logic [9:5]        CU,
  input  logic              S5,
  input  logic              S6,
  output logic [7:0]        address
);
  localparam int DEPTH = 256;

  logic             ram_oute, ram_we, rom_e, pce_n, pci;
  logic [7:0]       pc_q, mar_q, rom_q, ram_q, rom_d, ram_d;
  logic [7:0]       rom [DEPTH];
  logic [7:0]       ram [DEPTH];
  logic             rom_drv, ram_drv;

  always_comb {ram_oute, ram_we, rom_e, pce_n, pci} = CU;

  pc   u_pc  (.d(d_in), .i(pci), .s(S5), .clk(CLK), .reset(RST), .q(pc_q));
  lat8 u_mar (.CLK(CLK), .reset(RST), .S(S6), .din(d_in), .qout(mar_q));

  always_comb address = pce_n ? mar_q : pc_q;

  initial begin
    for (int k = 0; k < DEPTH; k++) begin
      rom[k] = '0;
      ram[k] = '0;
    end
    if (PROG_FILE != "") $readmemh(PROG_FILE, rom);
  end

  always_comb begin
    rom_q = rom[address];
    ram_q = ram[address];
  end

  always_ff @(posedge CLK) begin
    if (ram_we) ram[address] <= d_in;
  end

  tri8 u_rom_drv (.E(rom_e),    .I(rom_q), .d(rom_d), .drv(rom_drv));
  tri8 u_ram_drv (.E(ram_oute), .I(ram_q), .d(ram_d), .drv(ram_drv));

  always_comb begin
    d_out = rom_d | ram_d;
    d_drv = rom_drv | ram_drv;
  end
endmodule
