0badc0de
12345678
deadbeef
00000001
a5a5a5a5
