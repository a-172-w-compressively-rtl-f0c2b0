0000
02ee
05ed
00eb
03ea
06e8
01e7
04e6
0000
02e2
05e1
00df
03de
06dc
01db
04d9
0000
02d7
05d5
00d4
03d2
06d1
01cf
04cd
0000
02ca
05c9
00c7
03c6
06c5
01c3
04c2
0000
02bf
05bd
00bc
03ba
06b8
01b7
04b5
0000
02b2
05b1
00af
03ae
06ad
01ab
04a9
0000
02a6
05a5
00a4
03a2
06a0
019f
049e
0000
029a
0599
0097
0396
0695
0193
0492
02a8
03cf
07e1
0014
0391
05c6
03f4
074c
1c96
020d
1ba6
00ad
04e2
1a29
1fe9
0607
1c13
002f
0487
1e2c
0245
1884
1d1f
001d
0291
03d8
1fce
021c
04e6
18a4
1dfa
006a
0052
0248
04be
06df
0695
0763
0333
063b
1999
1c48
1c42
1d70
1ff0
02cb
06ad
1d79
012f
1b50
1de7
1f8f
1f8f
00d1
0315
05d7
1e87
011b
02b6
0416
04de
04df
07fe
1e59
196d
023d
05e3
1b1a
0213
0502
0176
03a6
057f
04e5
062a
1870
0704
068c
19c9
1dc1
0175
04fa
18e4
1df5
030d
074f
1b83
1fa5
1beb
1ea8
0112
030e
04a9
0233
0334
05af
187a
018f
057e
183c
1aaa
1cf6
0008
02bc
04f4
06b9
181e
18cc
18fa
01ba
0463
06dc
1935
1b1e
1cc9
1f75
03f3
18c6
1c02
19c9
1c4a
1f61
025e
1ec6
010c
03de
067c
1882
1e6e
0114
1ded
007d
02fc
1f62
022a
056f
187a
1ae9
1d50
1f4e
1ecf
0016
030b
070c
1a80
1c9d
1ed4
0103
1e4d
0030
03a7
1d4e
00aa
0433
1a86
0038
036f
0410
0484
18a2
1e36
02fc
0700
1a70
1d1d
1ef2
1d99
1d5f
1fd0
033f
1cb8
1fb0
0271
04e8
0715
19b1
1c11
1d82
1e12
1d4a
1e02
002e
02ac
0412
017e
0454
07df
1c46
1df3
00bd
0446
184f
