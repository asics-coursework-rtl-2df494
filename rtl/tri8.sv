// tri8: 8-bit bus driver.
//
// In the original schematic this is a bank of eight tri-state buffers:
// with E high d follows I, with E low d floats so another unit may drive
// the shared bus. Here the shared buses are built as wired-OR buses instead
// of tri-state nets (two-state simulation and FPGA fabric have no internal
// high impedance): a disabled driver outputs all zeros, and each bus is the
// OR of its drivers. Only one driver is enabled at a time, so the OR gives
// the same value a tri-state bus would. The "floating" state is made
// visible as drv = 0.
//
// Interface: E (enable), I[7:0], d[7:0] (I when enabled, else 0), drv
// (the driver is active). Purely combinational.
module tri8 (
  input  logic       E,
  input  logic [7:0] I,
  output logic [7:0] d,
  output logic       drv
);
  always_comb begin
    d   = E ? I : 8'h00;
    drv = E;
  end
endmodule
