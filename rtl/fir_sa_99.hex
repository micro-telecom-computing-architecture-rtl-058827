3fff6
3fff8
3fff5
3fff5
3fff6
3fffa
00002
0000f
00022
0003a
00059
0007d
000a3
000cb
000ef
0010d
00120
00122
00110
000e4
0009b
00034
3ffaf
3ff0f
3fe59
3fd96
3fccf
3fc14
3fb73
3fafe
3fac6
3fadc
3fb51
3fc30
3fd83
3ff50
00194
00449
00762
00acc
00e70
01230
015ed
01985
01cd7
01fc2
02228
023f1
0250c
02568
0250c
023f1
02228
01fc2
01cd7
01985
015ed
01230
00e70
00acc
00762
00449
00194
3ff50
3fd83
3fc30
3fb51
3fadc
3fac6
3fafe
3fb73
3fc14
3fccf
3fd96
3fe59
3ff0f
3ffaf
00034
0009b
000e4
00110
00122
00120
0010d
000ef
000cb
000a3
0007d
00059
0003a
00022
0000f
00002
3fffa
3fff6
3fff5
3fff5
3fff8
3fff6
