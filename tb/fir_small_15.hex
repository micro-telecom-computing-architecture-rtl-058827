3ff82
3fc5d
3f5ee
3f4e7
00b41
04100
07f52
09b72
07f52
04100
00b41
3f4e7
3f5ee
3fc5d
3ff82
