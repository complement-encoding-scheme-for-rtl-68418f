18000
08003
00000
00003
00001
00002
00006
07049
150db
05555
17ffe
0001b
00009
00438
00c68
07ffe
