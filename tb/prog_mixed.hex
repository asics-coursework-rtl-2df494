// Load, XOR, add and subtract on A, showing each result on port A:
//  00: LDA #80   02: OUTA A   03: XORA #5   05: OUTA A   06: ADDA #10
//  08: OUTA A    09: SUBA #5  0B: OUTA A    0C: JMP 05
13 50 02 63 05 02 83 0A 02 A3 05 02 01 05
