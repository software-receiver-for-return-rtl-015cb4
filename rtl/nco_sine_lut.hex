000
00d
019
026
032
03f
04b
058
064
071
07e
08a
097
0a3
0b0
0bc
0c9
0d5
0e2
0ee
0fb
107
113
120
12c
139
145
152
15e
16a
177
183
18f
19c
1a8
1b4
1c1
1cd
1d9
1e5
1f1
1fe
20a
216
222
22e
23a
246
252
25e
26a
276
282
28e
29a
2a6
2b2
2bd
2c9
2d5
2e1
2ec
2f8
304
30f
31b
327
332
33e
349
354
360
36b
377
382
38d
398
3a4
3af
3ba
3c5
3d0
3db
3e6
3f1
3fc
407
412
41c
427
432
43d
447
452
45c
467
471
47c
486
490
49b
4a5
4af
4b9
4c3
4cd
4d7
4e1
4eb
4f5
4ff
509
513
51c
526
530
539
543
54c
555
55f
568
571
57a
583
58d
596
59f
5a7
5b0
5b9
5c2
5cb
5d3
5dc
5e4
5ed
5f5
5fd
606
60e
616
61e
626
62e
636
63e
646
64e
655
65d
665
66c
674
67b
682
68a
691
698
69f
6a6
6ad
6b4
6bb
6c1
6c8
6cf
6d5
6dc
6e2
6e9
6ef
6f5
6fb
701
707
70d
713
719
71f
724
72a
730
735
73a
740
745
74a
74f
754
759
75e
763
768
76d
771
776
77a
77f
783
787
78c
790
794
798
79c
79f
7a3
7a7
7aa
7ae
7b1
7b5
7b8
7bb
7bf
7c2
7c5
7c8
7ca
7cd
7d0
7d3
7d5
7d8
7da
7dc
7df
7e1
7e3
7e5
7e7
7e9
7eb
7ec
7ee
7f0
7f1
7f3
7f4
7f5
7f6
7f7
7f8
7f9
7fa
7fb
7fc
7fd
7fd
7fe
7fe
7fe
7ff
7ff
7ff
7ff
7ff
7ff
7ff
7fe
7fe
7fe
7fd
7fd
7fc
7fb
7fa
7f9
7f8
7f7
7f6
7f5
7f4
7f3
7f1
7f0
7ee
7ec
7eb
7e9
7e7
7e5
7e3
7e1
7df
7dc
7da
7d8
7d5
7d3
7d0
7cd
7ca
7c8
7c5
7c2
7bf
7bb
7b8
7b5
7b1
7ae
7aa
7a7
7a3
79f
79c
798
794
790
78c
787
783
77f
77a
776
771
76d
768
763
75e
759
754
74f
74a
745
740
73a
735
730
72a
724
71f
719
713
70d
707
701
6fb
6f5
6ef
6e9
6e2
6dc
6d5
6cf
6c8
6c1
6bb
6b4
6ad
6a6
69f
698
691
68a
682
67b
674
66c
665
65d
655
64e
646
63e
636
62e
626
61e
616
60e
606
5fd
5f5
5ed
5e4
5dc
5d3
5cb
5c2
5b9
5b0
5a7
59f
596
58d
583
57a
571
568
55f
555
54c
543
539
530
526
51c
513
509
4ff
4f5
4eb
4e1
4d7
4cd
4c3
4b9
4af
4a5
49b
490
486
47c
471
467
45c
452
447
43d
432
427
41c
412
407
3fc
3f1
3e6
3db
3d0
3c5
3ba
3af
3a4
398
38d
382
377
36b
360
354
349
33e
332
327
31b
30f
304
2f8
2ec
2e1
2d5
2c9
2bd
2b2
2a6
29a
28e
282
276
26a
25e
252
246
23a
22e
222
216
20a
1fe
1f1
1e5
1d9
1cd
1c1
1b4
1a8
19c
18f
183
177
16a
15e
152
145
139
12c
120
113
107
0fb
0ee
0e2
0d5
0c9
0bc
0b0
0a3
097
08a
07e
071
064
058
04b
03f
032
026
019
00d
000
ff3
fe7
fda
fce
fc1
fb5
fa8
f9c
f8f
f82
f76
f69
f5d
f50
f44
f37
f2b
f1e
f12
f05
ef9
eed
ee0
ed4
ec7
ebb
eae
ea2
e96
e89
e7d
e71
e64
e58
e4c
e3f
e33
e27
e1b
e0f
e02
df6
dea
dde
dd2
dc6
dba
dae
da2
d96
d8a
d7e
d72
d66
d5a
d4e
d43
d37
d2b
d1f
d14
d08
cfc
cf1
ce5
cd9
cce
cc2
cb7
cac
ca0
c95
c89
c7e
c73
c68
c5c
c51
c46
c3b
c30
c25
c1a
c0f
c04
bf9
bee
be4
bd9
bce
bc3
bb9
bae
ba4
b99
b8f
b84
b7a
b70
b65
b5b
b51
b47
b3d
b33
b29
b1f
b15
b0b
b01
af7
aed
ae4
ada
ad0
ac7
abd
ab4
aab
aa1
a98
a8f
a86
a7d
a73
a6a
a61
a59
a50
a47
a3e
a35
a2d
a24
a1c
a13
a0b
a03
9fa
9f2
9ea
9e2
9da
9d2
9ca
9c2
9ba
9b2
9ab
9a3
99b
994
98c
985
97e
976
96f
968
961
95a
953
94c
945
93f
938
931
92b
924
91e
917
911
90b
905
8ff
8f9
8f3
8ed
8e7
8e1
8dc
8d6
8d0
8cb
8c6
8c0
8bb
8b6
8b1
8ac
8a7
8a2
89d
898
893
88f
88a
886
881
87d
879
874
870
86c
868
864
861
85d
859
856
852
84f
84b
848
845
841
83e
83b
838
836
833
830
82d
82b
828
826
824
821
81f
81d
81b
819
817
815
814
812
810
80f
80d
80c
80b
80a
809
808
807
806
805
804
803
803
802
802
802
801
801
801
801
801
801
801
802
802
802
803
803
804
805
806
807
808
809
80a
80b
80c
80d
80f
810
812
814
815
817
819
81b
81d
81f
821
824
826
828
82b
82d
830
833
836
838
83b
83e
841
845
848
84b
84f
852
856
859
85d
861
864
868
86c
870
874
879
87d
881
886
88a
88f
893
898
89d
8a2
8a7
8ac
8b1
8b6
8bb
8c0
8c6
8cb
8d0
8d6
8dc
8e1
8e7
8ed
8f3
8f9
8ff
905
90b
911
917
91e
924
92b
931
938
93f
945
94c
953
95a
961
968
96f
976
97e
985
98c
994
99b
9a3
9ab
9b2
9ba
9c2
9ca
9d2
9da
9e2
9ea
9f2
9fa
a03
a0b
a13
a1c
a24
a2d
a35
a3e
a47
a50
a59
a61
a6a
a73
a7d
a86
a8f
a98
aa1
aab
ab4
abd
ac7
ad0
ada
ae4
aed
af7
b01
b0b
b15
b1f
b29
b33
b3d
b47
b51
b5b
b65
b70
b7a
b84
b8f
b99
ba4
bae
bb9
bc3
bce
bd9
be4
bee
bf9
c04
c0f
c1a
c25
c30
c3b
c46
c51
c5c
c68
c73
c7e
c89
c95
ca0
cac
cb7
cc2
cce
cd9
ce5
cf1
cfc
d08
d14
d1f
d2b
d37
d43
d4e
d5a
d66
d72
d7e
d8a
d96
da2
dae
dba
dc6
dd2
dde
dea
df6
e02
e0f
e1b
e27
e33
e3f
e4c
e58
e64
e71
e7d
e89
e96
ea2
eae
ebb
ec7
ed4
ee0
eed
ef9
f05
f12
f1e
f2b
f37
f44
f50
f5d
f69
f76
f82
f8f
f9c
fa8
fb5
fc1
fce
fda
fe7
ff3
