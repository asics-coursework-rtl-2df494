// Exercises every ALU function in both the immediate (xF3) and the
// output (xF2) micro-programs, two unused opcodes (no-operations) and a
// jump back to the start, so later passes start from a different ACC.
13 5A
03 A5 02 13 4D 12 23 CA 22 33 18 32
43 25 42 53 30 52 63 BB 62 73 1D 72
83 6D 82 93 13 92 A3 2C A2 B3 DE B2
C3 D6 C2 D3 23 D2 E3 7B E2 F3 2E F2
0E 04 01 00
