// Test program touching every micro-program and every ALU function.
// 00: load A..D            08: OUTA with all 16 ALU functions
// 18: out on ports B..D and port A from B..D
// 21: the 13 other immediate functions on A    3B: INA, OUTA, three no-ops
// 40: immediates on B, C, D                   48: jump over 4A, jump to 00
13 5A 14 C3 15 0F 16 F0
02 12 22 32 42 52 62 72 82 92 A2 B2 C2 D2 E2 F2
07 08 09 0A 0B 0C 27 38 49
33 11 43 3C 53 81 63 FF 73 00 83 27 93 27 A3 05 B3 09 C3 00 D3 44 E3 12 F3 13
0D 02 00 0E 0F
84 31 A5 07 B6 55 C4 00
01 4C 13 EE 01 00
