// Program ROM image: four accumulators counting on four ports.
//  00: ADDA #2   02: OUTA A   03: ADDB #4   05: OUTB B
//  06: ADDC #8   08: OUTC C   09: ADDD #16  0B: OUTD D   0C: JMP 00
83 02 02 84 04 07 85 08 08 86 10 09 01 00
