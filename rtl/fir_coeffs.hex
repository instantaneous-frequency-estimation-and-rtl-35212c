0000
0000
ffff
0003
0000
0002
fffd
fffb
0001
fffc
000d
0001
0003
fffb
ffe9
0008
fff6
0024
000d
fff7
fffc
ffba
001a
fff9
0041
0037
ffc4
0005
ff67
002e
0029
0052
009d
ff51
0003
ff03
0021
00c9
003b
0150
fe93
ffb1
fec7
ffbc
023d
fff8
023e
fd9a
fe72
ff15
feb0
053d
ffca
0327
fc65
fa5d
00c8
fc1c
0dc5
011d
03ba
f806
d23e
2aa8
2aa8
d23e
f806
03ba
011d
0dc5
fc1c
00c8
fa5d
fc65
0327
ffca
053d
feb0
ff15
fe72
fd9a
023e
fff8
023d
ffbc
fec7
ffb1
fe93
0150
003b
00c9
0021
ff03
0003
ff51
009d
0052
0029
002e
ff67
0005
ffc4
0037
0041
fff9
001a
ffba
fffc
fff7
000d
0024
fff6
0008
ffe9
fffb
0003
0001
000d
fffc
0001
fffb
fffd
0002
0000
0003
ffff
0000
0000
