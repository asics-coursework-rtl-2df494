// enablebus8: gate an 8-bit bus with one enable.
//
// Every bit of A is ANDed with I: F = A when I is high, F = 0 when it is
// low. The I/O block and the register bank use it to let a one-hot decoder
// output through only while a strobe or a direction line is high.
//
// Interface: A[7:0], I, F[7:0]. Combinational. Follows the design.
module enablebus8 (
  input  logic [7:0] A,
  input  logic       I,
  output logic [7:0] F
);
  always_comb F = A & {8{I}};
endmodule
