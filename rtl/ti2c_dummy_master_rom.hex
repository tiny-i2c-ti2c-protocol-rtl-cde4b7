A0
00
02
11
22
33
44
A0
00
02
A1
A0
FF
F0
55
A0
00
0E
AB
CD
EF
A4
A0
00
08
12
34
56
78
A0
00
08
