// Count up by 7 on port A:  00: ADDA #7   02: OUTA A   03: JMP 00
83 07 02 01 00
