// ADDA #5, OUTA, ADDA #-3, OUTA, then jump back to 02
03
05
02
03
FD
02
01
02
