0019
004b
007e
00b0
00e2
0114
0147
0179
01ab
01dd
0210
0242
0274
02a6
02d9
030b
033d
036f
03a2
03d4
0406
0438
046b
049d
04cf
0501
0534
0566
0598
05ca
05fc
062f
0661
0693
06c5
06f7
072a
075c
078e
07c0
07f2
0824
0857
0889
08bb
08ed
091f
0951
0983
09b6
09e8
0a1a
0a4c
0a7e
0ab0
0ae2
0b14
0b46
0b78
0baa
0bdc
0c0e
0c40
0c73
0ca5
0cd7
0d09
0d3b
0d6d
0d9f
0dd0
0e02
0e34
0e66
0e98
0eca
0efc
0f2e
0f60
0f92
0fc4
0ff6
1027
1059
108b
10bd
10ef
1121
1152
1184
11b6
11e8
121a
124b
127d
12af
12e0
1312
1344
1376
13a7
13d9
140b
143c
146e
149f
14d1
1503
1534
1566
1597
15c9
15fa
162c
165d
168f
16c0
16f2
1723
1755
1786
17b7
17e9
181a
184c
187d
18ae
18df
1911
1942
1973
19a5
19d6
1a07
1a38
1a69
1a9b
1acc
1afd
1b2e
1b5f
1b90
1bc1
1bf2
1c23
1c54
1c85
1cb6
1ce7
1d18
1d49
1d7a
1dab
1ddc
1e0d
1e3e
1e6e
1e9f
1ed0
1f01
1f32
1f62
1f93
1fc4
1ff4
2025
2056
2086
20b7
20e8
2118
2149
2179
21aa
21da
220b
223b
226b
229c
22cc
22fd
232d
235d
238e
23be
23ee
241e
244f
247f
24af
24df
250f
253f
256f
259f
25cf
25ff
262f
265f
268f
26bf
26ef
271f
274f
277f
27ae
27de
280e
283e
286d
289d
28cd
28fc
292c
295b
298b
29bb
29ea
2a1a
2a49
2a78
2aa8
2ad7
2b07
2b36
2b65
2b94
2bc4
2bf3
2c22
2c51
2c80
2caf
2cdf
2d0e
2d3d
2d6c
2d9b
2dca
2df9
2e27
2e56
2e85
2eb4
2ee3
2f11
2f40
2f6f
2f9e
2fcc
2ffb
3029
3058
3086
30b5
30e3
3112
3140
316f
319d
31cb
31fa
3228
3256
3284
32b2
32e1
330f
333d
336b
3399
33c7
33f5
3423
3451
347e
34ac
34da
3508
3535
3563
3591
35be
35ec
361a
3647
3675
36a2
36d0
36fd
372a
3758
3785
37b2
37df
380d
383a
3867
3894
38c1
38ee
391b
3948
3975
39a2
39cf
39fc
3a28
3a55
3a82
3aaf
3adb
3b08
3b34
3b61
3b8d
3bba
3be6
3c13
3c3f
3c6b
3c98
3cc4
3cf0
3d1c
3d49
3d75
3da1
3dcd
3df9
3e25
3e51
3e7d
3ea8
3ed4
3f00
3f2c
3f57
3f83
3faf
3fda
4006
4031
405d
4088
40b4
40df
410a
4135
4161
418c
41b7
41e2
420d
4238
4263
428e
42b9
42e4
430f
433a
4364
438f
43ba
43e4
440f
4439
4464
448e
44b9
44e3
450e
4538
4562
458c
45b7
45e1
460b
4635
465f
4689
46b3
46dd
4706
4730
475a
4784
47ad
47d7
4800
482a
4853
487d
48a6
48d0
48f9
4922
494b
4975
499e
49c7
49f0
4a19
4a42
4a6b
4a94
4abd
4ae5
4b0e
4b37
4b5f
4b88
4bb1
4bd9
4c01
4c2a
4c52
4c7b
4ca3
4ccb
4cf3
4d1b
4d44
4d6c
4d94
4dbc
4de3
4e0b
4e33
4e5b
4e83
4eaa
4ed2
4ef9
4f21
4f48
4f70
4f97
4fbf
4fe6
500d
5034
505b
5083
50aa
50d1
50f8
511e
5145
516c
5193
51ba
51e0
5207
522d
5254
527a
52a1
52c7
52ed
5314
533a
5360
5386
53ac
53d2
53f8
541e
5444
546a
5490
54b5
54db
5500
5526
554c
5571
5596
55bc
55e1
5606
562b
5651
5676
569b
56c0
56e5
5709
572e
5753
5778
579c
57c1
57e6
580a
582f
5853
5877
589c
58c0
58e4
5908
592c
5950
5974
5998
59bc
59e0
5a04
5a27
5a4b
5a6f
5a92
5ab6
5ad9
5afc
5b20
5b43
5b66
5b89
5bac
5bd0
5bf3
5c15
5c38
5c5b
5c7e
5ca1
5cc3
5ce6
5d08
5d2b
5d4d
5d70
5d92
5db4
5dd7
5df9
5e1b
5e3d
5e5f
5e81
5ea3
5ec4
5ee6
5f08
5f29
5f4b
5f6d
5f8e
5faf
5fd1
5ff2
6013
6035
6056
6077
6098
60b9
60da
60fa
611b
613c
615c
617d
619e
61be
61df
61ff
621f
623f
6260
6280
62a0
62c0
62e0
6300
631f
633f
635f
637f
639e
63be
63dd
63fd
641c
643b
645a
647a
6499
64b8
64d7
64f6
6514
6533
6552
6571
658f
65ae
65cc
65eb
6609
6627
6646
6664
6682
66a0
66be
66dc
66fa
6718
6736
6753
6771
678e
67ac
67c9
67e7
6804
6821
683e
685c
6879
6896
68b3
68d0
68ec
6909
6926
6942
695f
697b
6998
69b4
69d1
69ed
6a09
6a25
6a41
6a5d
6a79
6a95
6ab1
6acc
6ae8
6b04
6b1f
6b3b
6b56
6b71
6b8d
6ba8
6bc3
6bde
6bf9
6c14
6c2f
6c4a
6c65
6c7f
6c9a
6cb5
6ccf
6ce9
6d04
6d1e
6d38
6d53
6d6d
6d87
6da1
6dbb
6dd4
6dee
6e08
6e22
6e3b
6e55
6e6e
6e87
6ea1
6eba
6ed3
6eec
6f05
6f1e
6f37
6f50
6f69
6f81
6f9a
6fb3
6fcb
6fe4
6ffc
7014
702d
7045
705d
7075
708d
70a5
70bd
70d4
70ec
7104
711b
7133
714a
7161
7179
7190
71a7
71be
71d5
71ec
7203
721a
7231
7247
725e
7274
728b
72a1
72b7
72ce
72e4
72fa
7310
7326
733c
7352
7368
737d
7393
73a8
73be
73d3
73e9
73fe
7413
7428
743d
7452
7467
747c
7491
74a6
74ba
74cf
74e3
74f8
750c
7521
7535
7549
755d
7571
7585
7599
75ad
75c0
75d4
75e8
75fb
760f
7622
7635
7649
765c
766f
7682
7695
76a8
76ba
76cd
76e0
76f2
7705
7717
772a
773c
774e
7760
7773
7785
7797
77a8
77ba
77cc
77de
77ef
7801
7812
7823
7835
7846
7857
7868
7879
788a
789b
78ac
78bd
78cd
78de
78ee
78ff
790f
791f
792f
7940
7950
7960
7970
797f
798f
799f
79ae
79be
79cd
79dd
79ec
79fb
7a0b
7a1a
7a29
7a38
7a47
7a55
7a64
7a73
7a81
7a90
7a9e
7aad
7abb
7ac9
7ad7
7ae5
7af3
7b01
7b0f
7b1d
7b2b
7b38
7b46
7b53
7b61
7b6e
7b7b
7b89
7b96
7ba3
7bb0
7bbd
7bc9
7bd6
7be3
7bef
7bfc
7c08
7c15
7c21
7c2d
7c39
7c45
7c51
7c5d
7c69
7c75
7c81
7c8c
7c98
7ca3
7caf
7cba
7cc5
7cd0
7cdb
7ce6
7cf1
7cfc
7d07
7d12
7d1c
7d27
7d31
7d3c
7d46
7d50
7d5b
7d65
7d6f
7d79
7d83
7d8c
7d96
7da0
7da9
7db3
7dbc
7dc6
7dcf
7dd8
7de1
7dea
7df3
7dfc
7e05
7e0e
7e16
7e1f
7e27
7e30
7e38
7e41
7e49
7e51
7e59
7e61
7e69
7e71
7e78
7e80
7e88
7e8f
7e97
7e9e
7ea5
7ead
7eb4
7ebb
7ec2
7ec9
7ed0
7ed6
7edd
7ee4
7eea
7ef1
7ef7
7efd
7f04
7f0a
7f10
7f16
7f1c
7f22
7f27
7f2d
7f33
7f38
7f3e
7f43
7f48
7f4e
7f53
7f58
7f5d
7f62
7f67
7f6b
7f70
7f75
7f79
7f7e
7f82
7f86
7f8b
7f8f
7f93
7f97
7f9b
7f9f
7fa2
7fa6
7faa
7fad
7fb1
7fb4
7fb7
7fbb
7fbe
7fc1
7fc4
7fc7
7fca
7fcc
7fcf
7fd2
7fd4
7fd7
7fd9
7fdb
7fde
7fe0
7fe2
7fe4
7fe6
7fe8
7fe9
7feb
7fed
7fee
7ff0
7ff1
7ff3
7ff4
7ff5
7ff6
7ff7
7ff8
7ff9
7ffa
7ffa
7ffb
7ffb
7ffc
7ffc
7ffd
7ffd
7ffd
7ffd
