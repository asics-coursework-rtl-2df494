// Count down by 3 on port A:  00: SUBA #3   02: OUTA A   03: JMP 00
A3 03 02 01 00
