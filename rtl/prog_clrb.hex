74
FF
C2
00
C2
01
C2
02
C2
03
C2
04
C2
05
C2
06
C2
07
80
FE
