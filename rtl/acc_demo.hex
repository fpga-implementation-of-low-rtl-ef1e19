// Demo program of the accumulator machine, see rtl/risc_cpu.sv.
// Words 0-30: the seven operations on M[100]=0xF0 and M[101]=0xAA, results
// to M[110..116]; 1.5*2.25+1.5 in floating point to M[117]; a countdown of
// M[105] from 3 by M[104]=1 with JZ/JMP; HLT at 30.
@0
50000064
08000065
5800006e
50000064
10000065
5800006f
50000064
30000065
58000070
50000064
20000065
58000071
50000064
40000065
58000072
50000064
18000065
58000073
50000064
28000065
58000074
50000066
90000067
80000066
58000075
50000069
10000068
58000069
6800001e
60000019
98000000
@64
000000f0
000000aa
3fc00000
40100000
00000001
00000003
