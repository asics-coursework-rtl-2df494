03
01
02
01
00
00
00
00
