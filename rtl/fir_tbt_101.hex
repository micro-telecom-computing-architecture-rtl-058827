00001
00002
00000
3fffd
00001
00006
3fffc
3fff5
0000a
00010
3ffea
3ffec
00029
00014
3ffba
3fff7
0006b
3ffed
3ff6a
0004a
000bd
3ff5e
3ff2c
00121
000c6
3fe3d
3ff84
0027f
3ffdc
3fcc6
00132
003d1
3fd41
3fbf2
004d0
003b1
3f8a6
3fd96
00a40
3ffd9
3f2ab
00486
0105d
3f465
3ece9
01799
01541
3cf5a
3e95a
0a108
11720
0a108
3e95a
3cf5a
01541
01799
3ece9
3f465
0105d
00486
3f2ab
3ffd9
00a40
3fd96
3f8a6
003b1
004d0
3fbf2
3fd41
003d1
00132
3fcc6
3ffdc
0027f
3ff84
3fe3d
000c6
00121
3ff2c
3ff5e
000bd
0004a
3ff6a
3ffed
0006b
3fff7
3ffba
00014
00029
3ffec
3ffea
00010
0000a
3fff5
3fffc
00006
00001
3fffd
00000
00002
00001
