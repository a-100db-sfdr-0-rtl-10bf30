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
02a7
02d9
030b
033d
0370
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
0825
0857
0889
08bb
08ed
091f
0951
0984
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
0bab
0bdd
0c0f
0c41
0c73
0ca5
0cd7
0d09
0d3b
0d6d
0d9f
0dd1
0e03
0e35
0e67
0e99
0eca
0efc
0f2e
0f60
0f92
0fc4
0ff6
1028
105a
108b
10bd
10ef
1121
1153
1185
11b6
11e8
121a
124c
127d
12af
12e1
1312
1344
1376
13a8
13d9
140b
143c
146e
14a0
14d1
1503
1534
1566
1598
15c9
15fb
162c
165e
168f
16c1
16f2
1724
1755
1786
17b8
17e9
181b
184c
187d
18af
18e0
1911
1942
1974
19a5
19d6
1a07
1a39
1a6a
1a9b
1acc
1afd
1b2e
1b60
1b91
1bc2
1bf3
1c24
1c55
1c86
1cb7
1ce8
1d19
1d4a
1d7b
1dac
1ddc
1e0d
1e3e
1e6f
1ea0
1ed1
1f01
1f32
1f63
1f94
1fc4
1ff5
2026
2056
2087
20b7
20e8
2119
2149
217a
21aa
21db
220b
223c
226c
229c
22cd
22fd
232e
235e
238e
23be
23ef
241f
244f
247f
24af
24e0
2510
2540
2570
25a0
25d0
2600
2630
2660
2690
26c0
26f0
2720
274f
277f
27af
27df
280f
283e
286e
289e
28cd
28fd
292d
295c
298c
29bb
29eb
2a1a
2a4a
2a79
2aa8
2ad8
2b07
2b37
2b66
2b95
2bc4
2bf4
2c23
2c52
2c81
2cb0
2cdf
2d0e
2d3d
2d6c
2d9b
2dca
2df9
2e28
2e57
2e86
2eb5
2ee3
2f12
2f41
2f70
2f9e
2fcd
2ffc
302a
3059
3087
30b6
30e4
3113
3141
316f
319e
31cc
31fa
3229
3257
3285
32b3
32e1
330f
333e
336c
339a
33c8
33f6
3423
3451
347f
34ad
34db
3509
3536
3564
3592
35bf
35ed
361a
3648
3676
36a3
36d0
36fe
372b
3759
3786
37b3
37e0
380e
383b
3868
3895
38c2
38ef
391c
3949
3976
39a3
39d0
39fd
3a29
3a56
3a83
3ab0
3adc
3b09
3b35
3b62
3b8e
3bbb
3be7
3c14
3c40
3c6c
3c99
3cc5
3cf1
3d1d
3d4a
3d76
3da2
3dce
3dfa
3e26
3e52
3e7d
3ea9
3ed5
3f01
3f2d
3f58
3f84
3fb0
3fdb
4007
4032
405e
4089
40b5
40e0
410b
4136
4162
418d
41b8
41e3
420e
4239
4264
428f
42ba
42e5
4310
433b
4365
4390
43bb
43e5
4410
443b
4465
448f
44ba
44e4
450f
4539
4563
458d
45b8
45e2
460c
4636
4660
468a
46b4
46de
4707
4731
475b
4785
47ae
47d8
4802
482b
4855
487e
48a7
48d1
48fa
4923
494d
4976
499f
49c8
49f1
4a1a
4a43
4a6c
4a95
4abe
4ae6
4b0f
4b38
4b61
4b89
4bb2
4bda
4c03
4c2b
4c53
4c7c
4ca4
4ccc
4cf4
4d1d
4d45
4d6d
4d95
4dbd
4de5
4e0d
4e34
4e5c
4e84
4eab
4ed3
4efb
4f22
4f4a
4f71
4f99
4fc0
4fe7
500e
5036
505d
5084
50ab
50d2
50f9
5120
5147
516d
5194
51bb
51e2
5208
522f
5255
527c
52a2
52c8
52ef
5315
533b
5361
5387
53ae
53d4
53fa
541f
5445
546b
5491
54b7
54dc
5502
5527
554d
5572
5598
55bd
55e2
5608
562d
5652
5677
569c
56c1
56e6
570b
5730
5754
5779
579e
57c2
57e7
580c
5830
5854
5879
589d
58c1
58e5
590a
592e
5952
5976
599a
59bd
59e1
5a05
5a29
5a4c
5a70
5a94
5ab7
5ada
5afe
5b21
5b44
5b68
5b8b
5bae
5bd1
5bf4
5c17
5c3a
5c5d
5c7f
5ca2
5cc5
5ce7
5d0a
5d2c
5d4f
5d71
5d94
5db6
5dd8
5dfa
5e1c
5e3e
5e60
5e82
5ea4
5ec6
5ee8
5f09
5f2b
5f4d
5f6e
5f90
5fb1
5fd2
5ff4
6015
6036
6057
6078
6099
60ba
60db
60fc
611d
613d
615e
617f
619f
61c0
61e0
6200
6221
6241
6261
6281
62a1
62c1
62e1
6301
6321
6341
6360
6380
63a0
63bf
63df
63fe
641d
643d
645c
647b
649a
64b9
64d8
64f7
6516
6535
6554
6572
6591
65af
65ce
65ec
660b
6629
6647
6666
6684
66a2
66c0
66de
66fc
6719
6737
6755
6772
6790
67ae
67cb
67e8
6806
6823
6840
685d
687a
6897
68b4
68d1
68ee
690b
6927
6944
6961
697d
699a
69b6
69d2
69ee
6a0b
6a27
6a43
6a5f
6a7b
6a97
6ab2
6ace
6aea
6b05
6b21
6b3c
6b58
6b73
6b8e
6baa
6bc5
6be0
6bfb
6c16
6c31
6c4c
6c66
6c81
6c9c
6cb6
6cd1
6ceb
6d06
6d20
6d3a
6d54
6d6e
6d88
6da2
6dbc
6dd6
6df0
6e0a
6e23
6e3d
6e56
6e70
6e89
6ea2
6ebc
6ed5
6eee
6f07
6f20
6f39
6f52
6f6b
6f83
6f9c
6fb4
6fcd
6fe5
6ffe
7016
702e
7046
705f
7077
708f
70a6
70be
70d6
70ee
7105
711d
7134
714c
7163
717a
7192
71a9
71c0
71d7
71ee
7205
721c
7232
7249
7260
7276
728d
72a3
72b9
72d0
72e6
72fc
7312
7328
733e
7354
7369
737f
7395
73aa
73c0
73d5
73eb
7400
7415
742a
743f
7454
7469
747e
7493
74a8
74bc
74d1
74e5
74fa
750e
7522
7537
754b
755f
7573
7587
759b
75ae
75c2
75d6
75e9
75fd
7610
7624
7637
764a
765e
7671
7684
7697
76a9
76bc
76cf
76e2
76f4
7707
7719
772c
773e
7750
7762
7774
7786
7798
77aa
77bc
77ce
77df
77f1
7803
7814
7825
7837
7848
7859
786a
787b
788c
789d
78ae
78be
78cf
78e0
78f0
7901
7911
7921
7931
7941
7952
7962
7971
7981
7991
79a1
79b0
79c0
79cf
79df
79ee
79fd
7a0d
7a1c
7a2b
7a3a
7a49
7a57
7a66
7a75
7a83
7a92
7aa0
7aaf
7abd
7acb
7ad9
7ae7
7af5
7b03
7b11
7b1f
7b2d
7b3a
7b48
7b55
7b63
7b70
7b7d
7b8b
7b98
7ba5
7bb2
7bbf
7bcb
7bd8
7be5
7bf1
7bfe
7c0a
7c17
7c23
7c2f
7c3b
7c47
7c53
7c5f
7c6b
7c77
7c83
7c8e
7c9a
7ca5
7cb1
7cbc
7cc7
7cd2
7cdd
7ce8
7cf3
7cfe
7d09
7d14
7d1e
7d29
7d33
7d3e
7d48
7d52
7d5c
7d67
7d71
7d7b
7d84
7d8e
7d98
7da2
7dab
7db5
7dbe
7dc8
7dd1
7dda
7de3
7dec
7df5
7dfe
7e07
7e10
7e18
7e21
7e29
7e32
7e3a
7e42
7e4b
7e53
7e5b
7e63
7e6b
7e73
7e7a
7e82
7e8a
7e91
7e99
7ea0
7ea7
7eaf
7eb6
7ebd
7ec4
7ecb
7ed2
7ed8
7edf
7ee6
7eec
7ef3
7ef9
7eff
7f05
7f0c
7f12
7f18
7f1e
7f23
7f29
7f2f
7f35
7f3a
7f40
7f45
7f4a
7f50
7f55
7f5a
7f5f
7f64
7f69
7f6d
7f72
7f77
7f7b
7f80
7f84
7f88
7f8d
7f91
7f95
7f99
7f9d
7fa1
7fa4
7fa8
7fac
7faf
7fb3
7fb6
7fb9
7fbd
7fc0
7fc3
7fc6
7fc9
7fcc
7fce
7fd1
7fd4
7fd6
7fd9
7fdb
7fdd
7fe0
7fe2
7fe4
7fe6
7fe8
7fea
7feb
7fed
7fef
7ff0
7ff2
7ff3
7ff5
7ff6
7ff7
7ff8
7ff9
7ffa
7ffb
7ffc
7ffc
7ffd
7ffd
7ffe
7ffe
7fff
7fff
7fff
7fff
