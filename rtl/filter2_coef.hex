00002d
00000b
00000d
00000e
000010
000012
000013
000015
000017
000019
00001b
00001e
000020
000022
000025
000028
00002a
00002d
000030
000033
000036
000039
00003c
00003f
000042
000045
000048
00004b
00004f
000052
000055
000058
00005a
00005d
000060
000063
000065
000067
000069
00006b
00006d
00006e
00006f
000070
000070
000070
000070
00006f
00006e
00006c
00006a
000067
000064
000060
00005b
000056
000050
000049
000042
000039
000030
000026
00001b
000010
000003
7ffff5
7fffe6
7fffd6
7fffc5
7fffb3
7fff9f
7fff8b
7fff75
7fff5e
7fff46
7fff2c
7fff12
7ffef5
7ffed8
7ffeb9
7ffe99
7ffe77
7ffe54
7ffe30
7ffe0a
7ffde2
7ffdba
7ffd90
7ffd64
7ffd37
7ffd09
7ffcd9
7ffca8
7ffc76
7ffc42
7ffc0d
7ffbd7
7ffba0
7ffb67
7ffb2d
7ffaf3
7ffab7
7ffa7a
7ffa3c
7ff9fe
7ff9be
7ff97e
7ff93d
7ff8fc
7ff8ba
7ff878
7ff835
7ff7f2
7ff7af
7ff76c
7ff729
7ff6e7
7ff6a4
7ff662
7ff620
7ff5df
7ff59f
7ff55f
7ff521
7ff4e4
7ff4a7
7ff46d
7ff433
7ff3fc
7ff3c6
7ff391
7ff35f
7ff32f
7ff302
7ff2d7
7ff2ae
7ff288
7ff265
7ff245
7ff228
7ff20e
7ff1f7
7ff1e4
7ff1d5
7ff1c9
7ff1c1
7ff1bd
7ff1bc
7ff1c1
7ff1c9
7ff1d5
7ff1e6
7ff1fb
7ff215
7ff234
7ff257
7ff27f
7ff2ab
7ff2dd
7ff313
7ff34e
7ff38e
7ff3d3
7ff41c
7ff46b
7ff4be
7ff516
7ff573
7ff5d4
7ff63a
7ff6a5
7ff714
7ff787
7ff7ff
7ff87b
7ff8fa
7ff97e
7ffa06
7ffa91
7ffb1f
7ffbb1
7ffc46
7ffcde
7ffd78
7ffe15
7ffeb4
7fff55
7ffff8
00009d
000143
0001e9
000291
000339
0003e1
000489
000530
0005d7
00067d
000721
0007c4
000865
000903
00099f
000a38
000ace
000b60
000bee
000c78
000cfe
000d7f
000dfa
000e70
000ee0
000f4a
000fae
00100b
001061
0010b0
0010f7
001137
00116e
00119e
0011c5
0011e3
0011f9
001206
001209
001204
0011f4
0011dc
0011ba
00118e
001158
001118
0010cf
00107c
00101f
000fb8
000f47
000ecd
000e49
000dbc
000d25
000c86
000bdd
000b2c
000a72
0009b0
0008e6
000814
00073b
00065a
000573
000486
000392
000299
00019b
000098
7fff91
7ffe86
7ffd78
7ffc67
7ffb54
7ffa3f
7ff929
7ff812
7ff6fb
7ff5e5
7ff4d0
7ff3bc
7ff2ab
7ff19d
7ff092
7fef8c
7fee8a
7fed8d
7fec97
7feba7
7feabe
7fe9dd
7fe904
7fe834
7fe76e
7fe6b2
7fe600
7fe55a
7fe4bf
7fe430
7fe3ae
7fe33a
7fe2d2
7fe279
7fe22e
7fe1f2
7fe1c5
7fe1a8
7fe19a
7fe19c
7fe1af
7fe1d2
7fe206
7fe24a
7fe29f
7fe306
7fe37d
7fe406
7fe49f
7fe54a
7fe605
7fe6d1
7fe7ad
7fe89a
7fe996
7feaa3
7febbf
7fece9
7fee23
7fef6a
7ff0c0
7ff222
7ff391
7ff50c
7ff693
7ff824
7ff9bf
7ffb64
7ffd11
7ffec6
000081
000243
00040a
0005d6
0007a5
000976
000b49
000d1c
000eef
0010c1
001290
00145c
001623
0017e4
00199f
001b52
001cfd
001e9e
002034
0021bf
00233c
0024ac
00260d
00275e
00289f
0029ce
002aea
002bf3
002ce8
002dc8
002e92
002f45
002fe1
003065
0030d1
003123
00315c
00317a
00317e
003167
003135
0030e7
00307e
002ff8
002f56
002e99
002dbf
002cc9
002bb8
002a8a
002942
0027de
002660
0024c7
002315
00214a
001f66
001d6b
001b59
001930
0016f3
0014a1
00123c
000fc4
000d3c
000aa4
0007fd
000548
000288
7fffbd
7ffce9
7ffa0c
7ff72a
7ff442
7ff157
7fee6b
7feb7e
7fe893
7fe5ab
7fe2c7
7fdfeb
7fdd16
7fda4b
7fd78c
7fd4d9
7fd236
7fcfa3
7fcd23
7fcab6
7fc85e
7fc61e
7fc3f6
7fc1e8
7fbff6
7fbe21
7fbc6a
7fbad3
7fb95c
7fb809
7fb6d8
7fb5cd
7fb4e7
7fb427
7fb390
7fb320
7fb2da
7fb2be
7fb2cc
7fb305
7fb369
7fb3f9
7fb4b5
7fb59e
7fb6b2
7fb7f3
7fb95f
7fbaf8
7fbcbb
7fbeaa
7fc0c3
7fc306
7fc572
7fc806
7fcac2
7fcda3
7fd0aa
7fd3d5
7fd722
7fda91
7fde1f
7fe1cb
7fe593
7fe976
7fed72
7ff185
7ff5ac
7ff9e6
7ffe31
00028a
0006ef
000b5e
000fd4
001450
0018ce
001d4c
0021c8
00263e
002aae
002f13
00336b
0037b4
003beb
00400d
004419
00480a
004be0
004f97
00532d
00569f
0059eb
005d10
006009
0062d6
006574
0067e2
006a1d
006c23
006df2
006f8a
0070e8
00720b
0072f2
00739b
007405
00742f
007419
0073c2
007329
00724d
00712f
006fce
006e2b
006c44
006a1c
0067b2
006506
00621a
005eee
005b84
0057dc
0053f8
004fda
004b82
0046f4
004230
003d3a
003812
0032bc
002d3a
00278f
0021bd
001bc6
0015af
000f7b
00092b
0002c4
7ffc49
7ff5bd
7fef25
7fe882
7fe1da
7fdb30
7fd487
7fcde3
7fc749
7fc0bc
7fba3f
7fb3d7
7fad88
7fa755
7fa143
7f9b54
7f958d
7f8ff2
7f8a86
7f854d
7f804a
7f7b81
7f76f5
7f72aa
7f6ea1
7f6ae0
7f6768
7f643c
7f615f
7f5ed4
7f5c9c
7f5aba
7f5931
7f5801
7f572c
7f56b4
7f569b
7f56e1
7f5787
7f588e
7f59f6
7f5bc0
7f5dec
7f6079
7f6367
7f66b6
7f6a65
7f6e72
7f72dd
7f77a3
7f7cc4
7f823d
7f880c
7f8e2f
7f94a3
7f9b65
7fa273
7fa9c9
7fb163
7fb93f
7fc158
7fc9ab
7fd233
7fdaec
7fe3d2
7fece0
7ff612
7fff61
0008cb
001249
001bd6
00256d
002f09
0038a4
004239
004bc3
00553b
005e9c
0067e1
007103
0079fe
0082cd
008b68
0093cc
009bf2
00a3d6
00ab71
00b2c0
00b9bd
00c063
00c6ae
00cc99
00d21f
00d73e
00dbef
00e030
00e3fd
00e753
00ea2f
00ec8d
00ee6c
00efc7
00f09f
00f0f0
00f0b9
00eff9
00eeaf
00ecda
00ea79
00e78e
00e417
00e016
00db8b
00d677
00d0dc
00cabc
00c41a
00bcf6
00b554
00ad38
00a4a4
009b9d
009225
008842
007df8
00734c
006843
005ce2
00512f
00452f
0038e9
002c64
001fa4
0012b2
000595
7ff852
7feaf2
7fdd7b
7fcff6
7fc269
7fb4dd
7fa759
7f99e4
7f8c88
7f7f4b
7f7235
7f654f
7f58a1
7f4c31
7f4008
7f342d
7f28a8
7f1d81
7f12bf
7f0868
7efe84
7ef519
7eec2f
7ee3cc
7edbf5
7ed4b0
7ece04
7ec7f6
7ec289
7ebdc5
7eb9ab
7eb642
7eb38c
7eb18c
7eb046
7eafbc
7eaff1
7eb0e6
7eb29c
7eb514
7eb850
7ebc4e
7ec10f
7ec692
7eccd5
7ed3d7
7edb96
7ee40f
7eed3f
7ef723
7f01b6
7f0cf5
7f18db
7f2562
7f3285
7f403e
7f4e86
7f5d58
7f6cab
7f7c78
7f8cb7
7f9d61
7fae6c
7fbfd0
7fd183
7fe37d
7ff5b4
00081e
001ab0
002d61
004027
0052f6
0065c4
007887
008b33
009dbd
00b01c
00c242
00d427
00e5be
00f6fd
0107da
011849
012841
0137b6
0146a0
0154f3
0162a7
016fb1
017c09
0187a7
019280
019c8f
01a5ca
01ae2a
01b5aa
01bc41
01c1ea
01c6a0
01ca5d
01cd1d
01cedc
01cf97
01cf4a
01cdf4
01cb92
01c823
01c3a7
01be1d
01b787
01afe5
01a739
019d85
0192ce
018715
017a60
016cb4
015e15
014e8a
013e1a
012ccb
011aa6
0107b3
00f3fb
00df87
00ca61
00b493
009e29
00872d
006fac
0057b2
003f4b
002684
000d6a
7ff40c
7fda77
7fc0b8
7fa6df
7f8cfb
7f7318
7f5948
7f3f98
7f2617
7f0cd5
7ef3e1
7edb49
7ec31e
7eab6c
7e9445
7e7db5
7e67cb
7e5296
7e3e23
7e2a81
7e17bb
7e05df
7df4fa
7de518
7dd643
7dc888
7dbbf1
7db088
7da656
7d9d64
7d95ba
7d8f60
7d8a5d
7d86b7
7d8473
7d8396
7d8424
7d8621
7d898e
7d8e6d
7d94bf
7d9c84
7da5ba
7db062
7dbc76
7dc9f6
7dd8db
7de921
7dfac3
7e0db9
7e21fc
7e3783
7e4e45
7e6639
7e7f53
7e9988
7eb4cc
7ed111
7eee4b
7f0c6a
7f2b5f
7f4b1c
7f6b8f
7f8ca8
7fae56
7fd086
7ff327
001626
00396e
005cee
008092
00a444
00c7f1
00eb85
010eea
01320c
0154d7
017735
019912
01ba59
01daf5
01fad2
0219dd
023800
025529
027145
028c40
02a609
02be8d
02d5bb
02eb83
02ffd5
0312a1
0323d8
03336e
034153
034d7e
0357e1
036072
036729
036bfb
036ee3
036fd8
036ed6
036bd8
0366da
035fdb
0356d8
034bd3
033ecc
032fc5
031ec2
030bc7
02f6db
02e003
02c748
02acb4
029050
027228
025249
0230c0
020d9c
01e8ee
01c2c5
019b34
01724e
014827
011cd2
00f067
00c2fc
0094a7
006581
0035a2
000525
7fd423
7fa2b6
7f70fa
7f3f0a
7f0d03
7edb00
7ea91f
7e777c
7e4634
7e1564
7de52a
7db5a2
7d86ea
7d591e
7d2c5c
7d00bf
7cd664
7cad66
7c85e0
7c5fee
7c3ba8
7c192a
7bf88a
7bd9e1
7bbd47
7ba2d0
7b8a93
7b74a3
7b6113
7b4ff6
7b415b
7b3553
7b2beb
7b2531
7b2130
7b1ff2
7b2180
7b25e0
7b2d1a
7b3730
7b4425
7b53fb
7b66b0
7b7c43
7b94b0
7baff1
7bcdff
7beed1
7c125c
7c3896
7c616f
7c8cd9
7cbac2
7ceb19
7d1dc8
7d52ba
7d89d8
7dc30a
7dfe34
7e3b3c
7e7a05
7eba70
7efc5e
7f3fad
7f843e
7fc9eb
001091
00580c
00a035
00e8e5
0131f6
017b3e
01c496
020dd3
0256cb
029f56
02e748
032e76
0374b6
03b9dd
03fdc1
044036
048113
04c02e
04fd5c
053876
057152
05a7ca
05dbb6
060cf0
063b53
0666bc
068f08
06b416
06d5c4
06f3f6
070e8c
07256d
07387d
0747a5
0752ce
0759e3
075cd3
075b8c
075601
074c23
073dea
072b4d
071447
06f8d4
06d8f2
06b4a4
068bec
065ed2
062d5c
05f798
05bd91
057f58
053cff
04f69c
04ac45
045e15
040c28
03b69c
035d92
03012e
02a196
023ef1
01d96a
01712d
010669
00994e
002a0f
7fb8e1
7f45f8
7ed18e
7e5bdd
7de51f
7d6d91
7cf573
7c7d02
7c0480
7b8c30
7b1452
7a9d2d
7a2703
79b21a
793eb7
78cd22
785da0
77f077
7785ef
771e4e
76b9da
7658da
75fb92
75a248
754d3f
74fcbc
74b100
746a4e
7428e4
73ed01
73b6e3
7386c5
735ce2
733970
731ca6
7306b8
72f7d8
72f034
72effb
72f756
73066e
731d67
733c64
736384
7392e5
73ca9f
740ac9
745377
74a4b7
74fe98
756121
75cc5a
764045
76bce0
774228
77d014
786699
7905a8
79ad2d
7a5d14
7b1542
7bd59a
7c9dfb
7d6e40
7e4643
7f25d8
000cd0
00faf9
01f01f
02ec08
03ee7a
04f736
0605fa
071a81
083485
0953bb
0a77d6
0ba088
0ccd7e
0dfe65
0f32e6
106aaa
11a556
12e28e
1421f5
15632c
16a5d1
17e984
192de2
1a7286
1bb70d
1cfb10
1e3e2a
1f7ff5
20c00b
21fe06
23397f
247210
25a755
26d8e8
280665
292f69
2a5393
2b7281
2c8bd5
2d9f30
2eac36
2fb28d
30b1dd
31a9d0
329a11
338250
34623d
35398b
3607f3
36cd2c
3788f4
383b0a
38e330
39812d
3a14ca
3a9dd5
3b1c1d
3b8f78
3bf7bd
3c54c8
3ca679
3cecb4
3d275f
3d5667
3d79bc
3d9150
3d9d1c
