00
00
00
00
00
00
00
00
00
00
00
00
00
01
01
01
01
02
02
02
03
03
03
04
04
04
04
05
05
05
05
05
00
00
00
00
00
00
00
01
01
00
00
00
00
ff
ff
fe
fe
fd
fd
fc
fc
fd
fd
fe
ff
00
02
03
04
05
06
06
00
00
00
00
00
00
00
00
00
00
01
01
ff
ff
00
00
00
00
03
02
fd
fb
ff
01
fe
01
0b
09
f4
e6
fa
1a
