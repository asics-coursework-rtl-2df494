// Mark 1 test 2: ADDA #8, OUTA, JMP 00
03
08
02
01
00
00
00
00
