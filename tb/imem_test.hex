00001000
00001011
00001022
00001033
00001044
00001055
00001066
00001077
00001088
00001099
000010aa
000010bb
000010cc
000010dd
000010ee
000010ff
