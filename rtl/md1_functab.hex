000000
428000
42b504
42ddb3
418000
418f1b
419cc4
41a953
41b504
41c000
41ca62
41d443
41ddb3
41e6c1
41ef77
41f7de
008000
0083f0
0087c3
008b7c
008f1b
0092a4
009617
009977
009cc4
00a000
00a32b
00a646
00a953
00ac53
00af45
00b22b
00b504
00b7d3
00ba97
00bd50
00c000
00c2a5
00c542
00c7d7
00ca62
00cce6
00cf62
00d1d6
00d443
00d6a9
00d908
00db61
00ddb3
00e000
00e246
00e486
00e6c1
00e8f6
00eb26
00ed51
00ef77
00f198
00f3b4
00f5cb
00f7de
00f9ed
00fbf7
00fdfd
018000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
45fff5
44ffd5
43bfb8
43ff55
429f59
42bee0
42de37
42fd57
418e1b
419d68
41ac8d
41bb88
41ca53
41d8ec
41e74e
41f577
0081b1
008886
008f39
0095c8
009c32
00a275
00a88f
00ae7f
00b444
00b9db
00bf44
00c47d
00c985
00ce5b
00d2fd
00d76a
00dba2
00dfa2
00e36b
00e6fb
00ea51
00ed6c
00f04c
00f2f0
00f557
00f781
00f96e
00fb1b
00fc8a
00fdba
00feab
00ff5b
00ffcc
00fffd
00ffee
00ff9f
00ff10
00fe42
00fd34
00fbe6
00fa5a
00f88e
00f685
00f43e
00f1bb
00eefa
00ebfe
00e8c7
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
018000
00ffe0
00ff80
00fee0
00fe00
00fce1
00fb83
00f9e6
00f80a
00f5f1
00f399
00f105
00ee35
00eb29
00e7e3
00e462
00e0a9
00dcb7
00d88e
00d42f
00cf9b
00cad3
00c5d8
00c0ac
00bb4f
00b5c4
00b00c
00aa27
00a418
009de0
009780
0090fb
008a51
008384
41f92f
41eb16
41dcc3
41ce38
41bf7a
41b08c
41a171
41922f
4182c8
42e680
42c737
42a7bc
428817
43d0a0
4390de
44a1f0
4687ec
c5bc05
c4dde8
c3aecb
c3ee77
c296f3
c2b686
c2d5ea
c2f51a
c18a05
c1995c
c1a88c
c1b792
c1c66a
c1d511
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
448005
438015
43c048
428055
42a0a8
42c124
42e1d3
41815f
4191f8
41a2b9
41b3aa
41c4cf
41d631
41e7d7
41f9ca
00860a
008f61
0098ef
00a2bd
00acd5
00b741
00c20e
00cd50
00d91a
00df3c
00e58b
00ec0f
00f2cc
00f9cb
01808a
01845b
018860
01896a
018a78
018b8b
018ca2
018dbe
018edf
019005
019131
019263
01939b
0194da
019621
01976f
0198c6
019a26
019b91
019d06
019e88
01a018
01a1b7
01a367
01a52a
01a705
01a8fa
01ab0f
01ad4b
01afb8
01b267
01b572
01b90d
01bdbe
01c90f
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
000000
