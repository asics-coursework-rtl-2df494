// Count up by 1 on port A:  00: ADDA #1   02: OUTA A   03: JMP 00
83 01 02 01 00
