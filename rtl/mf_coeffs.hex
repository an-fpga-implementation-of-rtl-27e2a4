ffe8
ffee
fff4
fffb
0002
0009
0011
0018
001f
0025
002b
0030
0035
0038
003b
003c
003d
003c
003a
0036
0031
002c
0025
001d
0014
000a
0000
fff5
ffea
ffdf
ffd5
ffcb
ffc1
ffb9
ffb2
ffac
ffa8
ffa6
ffa6
ffa8
ffac
ffb3
ffbc
ffc7
ffd5
ffe4
fff6
000a
001f
0035
004c
0064
007c
0094
00ab
00c0
00d4
00e6
00f5
0101
0109
010c
010c
0106
00fc
00ec
00d6
00bb
009a
0074
0049
0018
ffe3
ffaa
ff6d
ff2e
feec
fea9
fe65
fe23
fde2
fda3
fd69
fd33
fd04
fcdd
fcbd
fca8
fc9d
fc9f
fcad
fcc8
fcf2
fd2b
fd74
fdcc
fe35
fead
ff36
ffcf
0077
012e
01f2
02c4
03a2
048b
057d
0677
0777
087c
0983
0a8b
0b93
0c97
0d95
0e8d
0f7c
105f
1136
11fe
12b6
135c
13ef
146e
14d7
152a
1565
1589
1595
1589
1565
152a
14d7
146e
13ef
135c
12b6
11fe
1136
105f
0f7c
0e8d
0d95
0c97
0b93
0a8b
0983
087c
0777
0677
057d
048b
03a2
02c4
01f2
012e
0077
ffcf
ff36
fead
fe35
fdcc
fd74
fd2b
fcf2
fcc8
fcad
fc9f
fc9d
fca8
fcbd
fcdd
fd04
fd33
fd69
fda3
fde2
fe23
fe65
fea9
feec
ff2e
ff6d
ffaa
ffe3
0018
0049
0074
009a
00bb
00d6
00ec
00fc
0106
010c
010c
0109
0101
00f5
00e6
00d4
00c0
00ab
0094
007c
0064
004c
0035
001f
000a
fff6
ffe4
ffd5
ffc7
ffbc
ffb3
ffac
ffa8
ffa6
ffa6
ffa8
ffac
ffb2
ffb9
ffc1
ffcb
ffd5
ffdf
ffea
fff5
0000
000a
0014
001d
0025
002c
0031
0036
003a
003c
003d
003c
003b
0038
0035
0030
002b
0025
001f
0018
0011
0009
0002
fffb
fff4
ffee
ffe8
