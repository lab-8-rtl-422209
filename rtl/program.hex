8c020002
8c030003
00430810
ac010010
8c020004
8c030005
00430810
ac010011
8c020006
8c030007
00430810
ac010012
8c020008
8c030009
00430810
ac010013
8c020002
8c030003
00430812
ac010014
8c020004
8c030005
00430812
ac010015
8c020006
8c030007
00430812
ac010016
8c020008
8c030009
00430812
ac010017
8c020002
8c030003
00430814
ac010018
8c020004
8c030005
00430814
ac010019
8c020006
8c030007
00430814
ac01001a
8c020008
8c030009
00430814
ac01001b
