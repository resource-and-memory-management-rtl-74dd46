00000000
11111111
deadbeef
00000003
12345678
0badf00d
00000006
7fffffff
80000000
00000009
0000000a
cafef00d
0000000c
0000000d
0000000e
0000000f
