// Demo program of the register-file machine, see rtl/rf_cpu.sv.
// The seven operations on r1=0xF0 and r2=0xAA, results to data words 0-6;
// word 0 loaded back into r20; a countdown of r12 with BNE; each branch
// condition taken and not taken; then a jump to itself (halt).
504000f0
508000aa
51c00001
00c22000
60c00000
09022000
61000001
29422000
61400002
19822000
61800003
31c27000
61c00004
12022000
62000005
22422000
62400006
5d000000
53000003
53400001
0b18d000
73000014
6b000018
80000000
7b1a001a
80000000
7b400000
6b400000
8000001c
