// alu16: 16-bit ALU built from a chain of one-bit slices, with four flags.
//
// Every bit slice first conditions its operands with the input flags:
//   x' = (X & ENABLEX) | CONST1      (ENABLEX = 0 forces X to 0,
//                                     CONST1 = 1 forces X to all ones)
//   y' = Y ^ COMPY                   (COMPY = 1 complements Y)
// then produces, by FN: 00 x' + y' + carry-in, 01 x' | y', 10 x' & y',
// 11 x' ^ y'. The carry ripples from slice 0 (carry-in CIN) up to slice
// 15. Subtraction X - Y is FN = 00 with COMPY = 1 and CIN = 1; X + 1 is
// Y = 0 with CIN = 1; -1 is CONST1.
//
// Flags: COUT is the carry out of bit 15 when FN = 00 and 0 otherwise;
// ZFLAG is set when ALUOUT is 0; NFLAG is bit 15 of ALUOUT; OVFLAG is set
// when FN = 00 and the carries into and out of bit 15 differ (two's
// complement overflow).
//
// Interface: X, Y, ALUOUT [WIDTH-1:0]; CIN, CONST1, ENABLEX, COMPY;
// FN[1:0]; COUT, ZFLAG, NFLAG, OVFLAG. Combinational. The bit-slice
// structure, the operand conditioning and COUT follow the design. The FN
// code order is fixed by the design's own simulation results (see
// alu16_pkg); ZFLAG, NFLAG and OVFLAG are built as their names describe.
module alu16
  import alu16_pkg::*;
#(
  parameter int WIDTH = WORDSIZE
) (
  input  logic [WIDTH-1:0] X,
  input  logic [WIDTH-1:0] Y,
  input  logic             CIN,
  input  logic             CONST1,
  input  logic             ENABLEX,
  input  logic             COMPY,
  input  logic [1:0]       FN,
  output logic [WIDTH-1:0] ALUOUT,
  output logic             COUT,
  output logic             ZFLAG,
  output logic             NFLAG,
  output logic             OVFLAG
);
  logic [WIDTH-1:0] xs, ys, c_in, c_out;
  logic             carry;

  always_comb begin
    xs = (X & {WIDTH{ENABLEX}}) | {WIDTH{CONST1}};
    ys = Y ^ {WIDTH{COMPY}};
    carry = CIN;
    for (int k = 0; k < WIDTH; k++) begin
      c_in[k]  = carry;
      c_out[k] = (xs[k] & ys[k]) | (xs[k] & c_in[k]) | (ys[k] & c_in[k]);
      carry    = c_out[k];
      unique case (alu16_fn_e'(FN))
        FN_ADD: ALUOUT[k] = xs[k] ^ ys[k] ^ c_in[k];
        FN_OR:  ALUOUT[k] = xs[k] | ys[k];
        FN_AND: ALUOUT[k] = xs[k] & ys[k];
        FN_XOR: ALUOUT[k] = xs[k] ^ ys[k];
      endcase
    end
    COUT   = (alu16_fn_e'(FN) == FN_ADD) ? c_out[WIDTH-1] : 1'b0;
    OVFLAG = (alu16_fn_e'(FN) == FN_ADD) ? (c_out[WIDTH-1] ^ c_in[WIDTH-1]) : 1'b0;
    ZFLAG  = (ALUOUT == '0);
    NFLAG  = ALUOUT[WIDTH-1];
  end
endmodule
