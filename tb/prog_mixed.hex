74
01
F8
38
D2
03
F9
C4
C2
05
FA
80
FE
