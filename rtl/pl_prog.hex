8c010014
8c060015
00001820
00002020
00002820
00411020
00611822
00812024
00a12827
1041fff8
