20010005
2002fffd
00221820
00222022
00222824
00223025
ac030020
ac040021
ac050022
ac060023
0041182a
0022202a
000128c0
00023102
ac030024
ac040025
ac050026
ac060027
3c031234
00612021
00232823
ac030028
ac040029
ac05002a
20060000
00c13020
2021ffff
1420fffd
ac06002b
10000001
ac06002c
10c00001
ac06002d
0c000028
ac05002e
0800002d
ac06002f
00000000
00000000
00000000
20050077
00e00008
00000000
00000000
00000000
8c020002
8c030003
00430810
00232014
00822812
ac010030
ac040031
ac050032
20000009
ac000033
ac070034
1000ffff
