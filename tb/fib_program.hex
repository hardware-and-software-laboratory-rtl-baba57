// Fibonacci test program for tb_simple_b_init (SIMPLE machine code)
8100 //  0: LI  r1,0      a = 0
8201 //  1: LI  r2,1      b = 1
830a //  2: LI  r3,10     count
8401 //  3: LI  r4,1
8540 //  4: LI  r5,64     data pointer
c8d0 //  5: OUT r1        loop:
4d00 //  6: ST  r1,0(r5)
d660 //  7: MOV r6,r2
ce00 //  8: ADD r6,r1
d160 //  9: MOV r1,r2
f260 // 10: MOV r2,r6
e500 // 11: ADD r5,r4
e310 // 12: SUB r3,r4
bbf7 // 13: BNE loop
8690 // 14: LI  r6,-112   0xFF90
c684 // 15: SLL r6,4      0xF900, beyond 33 KW
6600 // 16: ST  r4,0(r6)  ignored
3e00 // 17: LD  r7,0(r6)  reads 0
c0f0 // 18: HLT
