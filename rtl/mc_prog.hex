8c010014
8c020015
00221820
00222022
00642824
00853027
ac060016
08000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
00000000
beef0000
0000beef
