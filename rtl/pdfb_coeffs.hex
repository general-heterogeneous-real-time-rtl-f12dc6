0013f
00116
00057
00121
000b6
0013f
00107
00166
0014b
0018c
0017f
001aa
001a2
001ba
001af
001b6
001a6
0019d
00184
0016e
0014b
0012a
000ff
000d3
000a2
00071
0003d
0000a
3ffd7
3ffa6
3ff78
3ff4e
3ff28
3ff08
3feef
3fedd
3fed2
3fecf
3fed4
3fee1
3fef6
3ff13
3ff35
3ff5e
3ff8c
3ffbe
3fff2
00027
0005d
00091
000c2
000ef
00116
00137
00151
00161
00169
00167
0015c
00147
00129
00102
000d3
0009e
00063
00024
3ffe3
3ffa0
3ff5f
3ff20
3fee6
3feb2
3fe86
3fe62
3fe49
3fe3b
3fe39
3fe42
3fe58
3fe7a
3fea7
3fede
3ff1f
3ff67
3ffb5
00007
0005a
000ae
000fe
0014a
0018f
001cb
001fc
00221
00238
00241
0023a
00224
001ff
001cb
00189
0013c
000e4
00084
0001e
3ffb5
3ff4c
3fee5
3fe82
3fe28
3fdd8
3fd95
3fd61
3fd3e
3fd2d
3fd2f
3fd44
3fd6c
3fda7
3fdf4
3fe50
3feba
3ff2f
3ffad
0002f
000b4
00136
001b4
00228
00291
002ea
00331
00365
00381
00387
00375
0034a
00308
002af
00242
001c3
00135
0009c
3fffb
3ff56
3feb2
3fe14
3fd7f
3fcf8
3fc83
3fc23
3fbdb
3fbaf
3fb9f
3fbac
3fbd8
3fc22
3fc87
3fd07
3fd9e
3fe49
3ff03
3ffc9
00094
00160
00227
002e4
00391
00429
004a8
0050a
0054b
0056a
00564
00538
004e8
00474
003df
0032c
0025f
0017d
0008b
3ff91
3fe94
3fd9b
3fcad
3fbd0
3fb0c
3fa65
3f9e1
3f984
3f951
3f94c
3f975
3f9cc
3fa4f
3fafd
3fbd1
3fcc7
3fdd9
3ff00
00035
0016f
002a7
003d4
004ed
005eb
006c6
00777
007f9
00847
0085d
0083b
007df
0074a
0067f
00583
0045a
0030d
001a2
00023
3fe9a
3fd11
3fb93
3fa29
3f8e0
3f7bf
3f6d0
3f61b
3f5a5
3f575
3f58b
3f5eb
3f693
3f781
3f8af
3fa18
3fbb3
3fd77
3ff58
0014b
00342
00530
00707
008bb
00a3e
00b85
00c85
00d36
00d90
00d8f
00d30
00c72
00b59
009e9
00829
00623
003e3
00177
3feed
3fc56
3f9c5
3f74a
3f4f7
3f2dd
3f10e
3ef97
3ee85
3ede4
3edbb
3ee10
3eee5
3f038
3f205
3f444
3f6ea
3f9e8
3fd2e
000a7
0043e
007dc
00b68
00ec9
011e7
014a9
016f9
018c2
019f2
01a7b
01a50
0196c
017ca
0156d
0125d
00ea3
00a52
0057d
0003f
3fab5
3f4fe
3ef40
3e99f
3e443
3df54
3daf9
3d758
3d497
3d2d6
3d235
3d2cc
3d4b1
3d7f3
3dc9b
3e2ab
3ea20
3f2f0
3fd07
0084e
014a6
021eb
02ff3
03e8f
04d8c
05cb6
06bd4
07aae
0890c
096b5
0a373
0af16
0b96c
0c24d
0c995
0cf26
0d2e9
0d4ce
