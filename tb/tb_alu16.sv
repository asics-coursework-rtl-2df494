// tb_alu16: self-checking test of the 16-bit ALU.
// Applies the design's published test vectors (X = 35425, Y = 2144 through
// all four functions; with CIN; with CONST1; with Y = 0 for the zero flag),
// then random operands and control bits, against an arithmetic model:
// X' = CONST1 ? all ones : (ENABLEX ? X : 0), Y' = COMPY ? ~Y : Y,
// FN 0 = X' + Y' + CIN, 1 = OR, 2 = AND, 3 = XOR. Carry and overflow are
// only produced by the add; zero and negative follow the result.
// Combinational; each case is checked 1 time unit after it is applied.
// The published test values come from the design's own tests; the random
// stimulus, the reference model and the run lengths are this bench's choice.
module tb_alu16;
  import alu16_pkg::*;
  logic [15:0] x, y, out;
  logic        cin, c1, ex, cy, cout, z, n, ov;
  logic [1:0]  fn;
  int checks = 0, failures = 0, n_cout = 0, n_ov = 0, n_z = 0, n_n = 0;

  alu16 dut (.X(x), .Y(y), .CIN(cin), .CONST1(c1), .ENABLEX(ex), .COMPY(cy), .FN(fn),
             .ALUOUT(out), .COUT(cout), .ZFLAG(z), .NFLAG(n), .OVFLAG(ov));

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [19:0] model();
    logic [15:0] xs, ys, r;
    logic [16:0] sum;
    logic        co, o;
    xs = c1 ? 16'hFFFF : (ex ? x : 16'h0);
    ys = cy ? ~y : y;
    sum = {1'b0, xs} + {1'b0, ys} + 17'(cin);
    co = 0; o = 0;
    case (fn)
      2'd0: begin r = sum[15:0]; co = sum[16]; o = (xs[15] == ys[15]) && (r[15] != xs[15]); end
      2'd1: r = xs | ys;
      2'd2: r = xs & ys;
      default: r = xs ^ ys;
    endcase
    return {co, r == 0, r[15], o, r};
  endfunction

  task automatic apply(logic [15:0] xi, logic [15:0] yi, logic ci, logic c1i,
                       logic exi, logic cyi, logic [1:0] fi);
    x = xi; y = yi; cin = ci; c1 = c1i; ex = exi; cy = cyi; fn = fi;
    #1 checks++;
    if ({cout, z, n, ov, out} !== model()) begin
      failures++;
      $display("FAIL x=%0d y=%0d cin=%b c1=%b ex=%b cy=%b fn=%0d: out=%0d c=%b z=%b n=%b v=%b",
               x, y, cin, c1, ex, cy, fn, out, cout, z, n, ov);
    end
    n_cout += int'(cout); n_ov += int'(ov); n_z += int'(z); n_n += int'(n);
  endtask

  task automatic doc(logic [15:0] e);
    checks++;
    if (out !== e) begin failures++; $display("FAIL published value: got %0d expected %0d", out, e); end
  endtask

  initial begin
    apply(35425, 2144, 0, 0, 1, 0, 0); doc(37569);
    apply(35425, 2144, 0, 0, 1, 0, 1); doc(35425 | 2144);
    apply(35425, 2144, 0, 0, 1, 0, 2); doc(35425 & 2144);
    apply(35425, 2144, 0, 0, 1, 0, 3); doc(35425 ^ 2144);
    apply(35425, 2144, 1, 0, 1, 0, 0); doc(37570);
    apply(35425, 2144, 0, 1, 1, 0, 0); doc(2143);
    apply(35425, 2144, 0, 1, 1, 0, 1); doc(65535);
    apply(35425, 2144, 0, 1, 1, 0, 2); doc(2144);
    apply(35425, 2144, 0, 1, 1, 0, 3); doc(63391);
    apply(35425, 0,    0, 0, 1, 0, 2); doc(0);
    checks++; if (!z) failures++;
    apply(16'h7FFF, 1, 0, 0, 1, 0, 0);
    checks++; if (!ov || !n) failures++;
    apply(1003, 1000, 1, 0, 1, 1, 0); doc(3);
    for (int i = 0; i < 5000; i++)
      apply(16'($urandom), 16'($urandom), 1'($urandom), ($urandom % 8) == 0,
            ($urandom % 8) != 0, 1'($urandom), 2'($urandom));
    checks++; if (n_cout == 0 || n_ov == 0 || n_z == 0 || n_n == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
