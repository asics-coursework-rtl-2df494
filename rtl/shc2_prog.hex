// Program ROM image: load, XOR, add and subtract on the accumulator,
// showing each result on the output port.
//  00: LDA #80   02: OUTA   03: XORA #5   05: OUTA   06: ADDA #10
//  08: OUTA      09: SUBA #5  0B: OUTA    0C: JMP 05
13 50 02 63 05 02 83 0A 02 A3 05 02 01 05
