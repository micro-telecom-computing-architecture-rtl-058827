00004
3fffd
3fff2
3ffdc
3ffba
3ff90
3ff64
3ff41
3ff39
3ff5c
3ffb7
0004f
00119
001fd
002ce
00354
00354
0029d
00117
3fecd
3fbfc
3f90f
3f69b
3f54a
3f5c4
3f88f
3fdf4
005e6
00ffc
01b6f
02733
03214
03ae2
0409d
04298
0409d
03ae2
03214
02733
01b6f
00ffc
005e6
3fdf4
3f88f
3f5c4
3f54a
3f69b
3f90f
3fbfc
3fecd
00117
0029d
00354
00354
002ce
001fd
00119
0004f
3ffb7
3ff5c
3ff39
3ff41
3ff64
3ff90
3ffba
3ffdc
3fff2
3fffd
00004
