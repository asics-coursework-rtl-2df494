// Count down by 16 on port A:  00: SUBA #16   02: OUTA A   03: JMP 00
A3 10 02 01 00
