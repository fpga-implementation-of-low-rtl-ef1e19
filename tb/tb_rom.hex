10000001
20000002
30000003
40000004
50000005
60000006
70000007
80000008
90000009
a000000a
b000000b
c000000c
d000000d
e000000e
f000000f
00000010
