// nn_coef: trained coefficient image, 13-bit s6.7 words; networks of C17, 74182,
// 74283, 7485 and Div4 at word 0, 26, 106, 231 and 279 (bias, then weights, per neuron)
00f3
1ffe
1f3e
1ecd
1f51
002c
0093
007b
19b4
01d1
02e8
1bf5
1fad
0ba0
03d9
1e59
1d56
1fc2
1bad
111c
1b6d
0fc0
1d98
0df3
1040
018e
00c2
1feb
002a
0083
005c
1e79
003a
0093
1040
1fb8
0251
005a
1ffb
1ed5
003e
003a
1f5c
1da7
001d
0008
0301
016a
1dfb
1ff1
0013
1fb9
1cfa
1ff2
1fea
1fb1
00f8
1ff2
0051
001e
002f
1f54
1ffc
1fbc
00bb
1dfa
1ed7
0011
0075
00a3
0fc0
0084
1ffd
004c
1fcd
0029
19ed
1e6f
1fc0
0fc0
1cb7
1fdc
17ea
00e0
0fb6
042d
1fe0
1ce9
1f10
0fc0
0980
000d
1f2e
1659
042e
132c
1e9c
1e56
1040
0954
1c80
1f3a
0204
1eb6
0107
0fc0
1f9c
003d
1ffc
1ffc
1ffc
003c
1ffc
1ffc
1ffc
003c
1f9c
1ffd
003c
1ffc
1ffc
1ffc
003c
1ffc
1ffc
1ffc
1f9f
0003
1fff
003f
1fff
1fff
1fff
003f
1fff
1fff
1fa3
0005
0003
000c
0038
0002
0003
000c
0038
0002
185e
04f6
1fde
1fde
1fde
04de
1fde
1fde
1fde
04de
1013
0461
08d3
1fd3
1fd3
0453
08d3
1fd3
1fd3
0453
101d
0211
0432
0860
1fcf
0219
0432
0860
1fcf
0219
1092
00fd
01fd
03f4
0808
00fd
01fd
03f4
0808
00fd
1a45
0fb9
001f
001f
001f
1c39
001f
001f
001f
1a45
001f
0fb9
001f
001f
0212
1c39
001f
001f
1a28
0002
0002
0f9c
0002
000a
01fd
1c1c
0002
1a28
0001
0001
000f
0f7a
0003
0003
01f3
1bfa
1b00
0000
0000
0000
0000
0000
0000
0000
0a00
1f97
007f
00cf
01e9
03c6
1f87
1f34
1e18
1c3b
1ffb
1fe0
002c
00a4
1f7c
1f0a
1eb3
1d53
0080
00f9
014d
02ad
0014
1e99
1ff1
1f2d
1eca
1c8e
0039
1ee9
0105
037d
1fbf
0110
010a
01fe
0092
03cb
1040
0303
1ec1
0073
162f
1040
0618
1d95
0fc0
1e85
1b93
1ecb
0007
0086
1f79
1b2b
1fa8
1f79
008e
037b
1f9c
1e22
1dec
1f8e
01da
1f90
01e8
1e5a
058a
0070
1fcd
1e8d
007b
00b4
1f0f
1f23
1cff
1d60
0096
1f5e
0ff3
0ea1
0015
1231
1ec5
003b
113c
0167
1e32
0120
0141
0116
1ff6
1f28
1e8a
1e03
002a
1c81
1f87
00d8
0070
1e04
1fd2
0069
1f1f
001d
1e69
1dd9
0194
0df8
0307
016c
1dc6
04ae
0039
00d1
1dea
0158
01c5
1c4e
1e1c
00fc
1f95
1f7b
1f99
0158
01d9
1ea1
1eae
1f24
0526
0102
1ff3
1eb8
024a
0bd8
00ea
1ebc
1919
1eec
0287
0007
1fb6
0011
1f52
01dd
1f45
044d
00c0
0c3f
0023
1d9d
04e2
007b
1e88
00a4
03dd
1f0b
1dc6
1fee
1f54
1f95
1d1e
1daa
015e
01ec
0266
0b40
004c
1fca
01af
021c
03f5
0012
1eee
1df2
1d79
0041
1fe6
1f71
008e
1f7d
1fd1
1fc4
1f07
0039
01a6
1f9b
007d
1fd7
0035
1bb2
10ae
14bc
1bfb
1fdf
1fe7
004e
1f93
1fee
00c4
1eb4
1e4c
12a1
1f90
1fb5
0017
1f4a
1a3f
1f54
1f4d
1fbf
055e
1fb4
1fb9
00ee
0125
1f9a
1ded
1c8b
1caf
1f75
0062
1fa2
1e5a
1e39
019b
00b4
01a9
1bb8
1f08
1fc7
1f91
1f0e
1ecb
1ce0
1ff0
0090
00cd
0317
00c1
0080
1f40
103b
1de3
1f3c
00d4
1f74
01cb
1fb1
00c6
00ba
01bf
1ffd
1e77
1dd3
1ef2
015e
1fe8
1e93
1f8e
1e77
00ba
0092
1f53
0125
1f79
0048
004e
1ecd
00e4
1fb2
1286
0160
1f3b
0043
1fd0
1f69
1fef
1f20
1e8e
1faa
0174
01a0
0fe2
1f90
1fa4
1fa2
1f09
1e53
003a
005f
0165
02a4
1fe6
00c2
1f34
1e66
0018
0040
1e55
03b4
02d4
00af
006e
1dcf
00e1
1f8f
1ff0
1b59
1e71
00e1
1f79
1f46
1ec8
00bb
1be2
1f7b
0017
0131
019b
0005
00a0
1f90
01e9
00c0
1e24
1dab
002f
1da8
00f0
0058
00a8
1ff8
1f67
1e1f
1d90
1e41
1b54
000c
00be
0144
1fa2
1fb1
1f63
0170
1f5e
1f74
000e
1d4e
0006
1f14
1efc
1ec0
0091
00fb
0172
0017
1cf8
1fc9
1f55
1b70
0045
1fd9
1f0a
02f0
1fab
007c
00be
1ea2
1d01
1f68
1e95
02c4
02a7
0027
1eb9
1f33
1d14
1fb3
0182
0074
1eeb
0155
004c
02dd
1ea9
1f39
1e1c
0008
0163
01f8
1d94
1fa0
0fbc
01b4
1e72
1e7d
1b48
1f07
1f18
1c94
1f4e
0cfa
1fc4
1f0d
0228
04fe
1fc7
0065
1f50
0027
1fee
1e09
1daf
01c0
00c9
0258
1e24
00ce
002d
020c
1d41
0314
0034
0050
00dc
1ec1
1f9a
0015
0076
1b7a
1f43
1e9e
1f0e
1ebb
0157
01f5
1f78
1e67
1d60
13ae
1e4f
0044
0353
1d71
1bf7
1e71
1e8b
1fe2
0030
077c
00b6
1fa8
0feb
1f82
1955
1483
02c0
1313
18fc
0b71
1bc2
0058
005e
1808
03b9
0598
0400
1f8c
03f1
0088
0450
1e96
1e10
1cb5
0017
00bc
1f59
04cf
002a
1dbc
1fe1
1010
000a
1f76
0140
006d
07b9
1fa6
00a9
00c3
1fbd
0032
004c
0567
0030
0064
0ff3
0b56
0f44
127b
0159
168d
0002
1b38
005d
1ec5
1a6c
10af
1de0
1010
00d7
0a13
0d78
1f7d
17c6
06c2
15ff
038e
0202
0081
1f79
1933
1feb
03ef
1ff8
1047
0179
053c
006f
003b
1f81
1f7a
01f3
1fcb
1fe8
1f9c
1f9b
1568
004f
1f78
0f69
002b
1ed8
0f43
0206
112c
0ff3
002e
1fee
0003
1c8f
1f70
1091
08ca
1ca5
006d
0489
0001
0209
02d5
12fe
1d5d
1f62
1f7f
1ff2
0095
0054
16f5
1fb8
1013
1e2c
04ca
1fcf
0023
003d
1f04
1fa3
1d98
1fd4
1f88
1db1
1db5
1fd0
1e57
0fba
052b
1cc9
0d2d
0025
1808
058c
1fe0
009a
1f22
1afa
1f9f
0070
003f
1668
020e
016d
1fe4
1f74
1cf8
1c82
02fb
1e2a
1fc1
1f5f
0061
1f74
1d24
1f7f
1eee
0313
199e
1ff7
0391
105b
1ff2
0384
0034
1fc5
0037
0002
1f36
1efb
0392
0701
1c7a
0595
01a5
1ee2
018b
0245
0002
1fed
0a1e
003f
0074
1ffb
1d02
00c6
1d15
1b43
1e9a
103c
1766
01c4
1fb4
04a5
1d10
0066
002e
1e0e
1d84
006e
082d
1d8f
19c2
1c2c
01a1
1f08
0002
04d4
0020
1f43
0038
1d16
1fce
0012
1f73
0256
1cb6
1f73
0c5e
0211
01db
1e93
1fdb
1f7f
1cf9
1fbc
1fb3
002b
019e
1c77
1ff8
192b
05c7
0045
1e43
0421
1f0c
003b
1da9
0015
0097
1fe5
1126
1fca
0c3c
018e
1fce
005a
1f30
1b2c
0046
008a
0090
1e91
0097
0064
018b
1fa2
0020
03ac
1275
0fb9
0ef8
1010
0b55
1010
043b
034d
0015
0095
0054
0121
1fc5
0feb
1ee3
1d24
1ec9
1ea5
0afb
13b9
1012
1cad
0054
007c
0455
1fd4
1fbb
1fc6
1025
00a7
02cf
004a
1bba
1d96
1fd5
01f0
0008
0009
1fec
1ce8
1f9b
1f25
1f87
0c6d
1d63
19c0
1f3f
1f5d
038f
1da7
1c27
0085
1f6a
0050
0c5b
0040
1aff
103f
0086
05dc
1f8e
1fea
0263
1d95
00b4
1e6d
1dcd
0013
004c
1e4e
1fc9
