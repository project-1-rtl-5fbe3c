74
00
D2
00
D2
01
D2
02
D2
03
D2
04
D2
05
D2
06
D2
07
80
FE
