7fff0000
7fffff37
7ffefe6e
7ffafda5
7ff6fcdc
7ff1fc13
7feafb4a
7fe2fa81
7fd9f9b8
7fcef8ef
7fc2f827
7fb5f75e
7fa7f695
7f98f5cd
7f87f505
7f75f43c
7f62f374
7f4ef2ac
7f38f1e4
7f22f11c
7f0af055
7ef0ef8d
7ed6eec6
7ebaedff
7e9ded38
7e7fec71
7e60ebab
7e3feae4
7e1eea1e
7dfbe958
7dd6e892
7db1e7cd
7d8ae707
7d63e642
7d3ae57d
7d0fe4b9
7ce4e3f4
7cb7e330
7c89e26d
7c5ae1a9
7c2ae0e6
7bf9e023
7bc6df61
7b92de9e
7b5ddddc
7b27dd1b
7aefdc59
7ab7db99
7a7ddad8
7a42da18
7a06d958
79c9d898
798ad7d9
794ad71b
790ad65c
78c8d59e
7885d4e1
7840d424
77fbd367
77b4d2ab
776cd1ef
7723d134
76d9d079
768ecfbe
7642cf04
75f4ce4b
75a6cd92
7556ccd9
7505cc21
74b3cb69
7460cab2
740bc9fc
73b6c946
735fc890
7308c7db
72afc727
7255c673
71fac5c0
719ec50d
7141c45b
70e3c3a9
7083c2f8
7023c248
6fc2c198
6f5fc0e9
6efbc03a
6e97bf8c
6e31bedf
6dcabe32
6d62bd86
6cf9bcda
6c8fbc2f
6c24bb85
6bb8badc
6b4bba33
6addb98b
6a6eb8e3
69fdb83c
698cb796
691ab6f1
68a7b64c
6832b5a8
67bdb505
6747b462
66d0b3c0
6657b31f
65deb27f
6564b1df
64e9b140
646cb0a2
63efb005
6371af68
62f2aecc
6272ae31
61f1ad97
616facfd
60ecac65
6068abcd
5fe4ab36
5f5eaaa0
5ed7aa0a
5e50a976
5dc8a8e2
5d3ea84f
5cb4a7bd
5c29a72c
5b9da69c
5b10a60c
5a82a57e
59f4a4f0
5964a463
58d4a3d7
5843a34c
57b1a2c2
571ea238
568aa1b0
55f6a129
5560a0a2
54caa01c
54339f98
539b9f14
53039e91
52699e0f
51cf9d8e
51349d0e
50989c8f
4ffb9c11
4f5e9b94
4ec09b17
4e219a9c
4d819a22
4ce199a9
4c409930
4b9e98b9
4afb9843
4a5897ce
49b49759
490f96e6
486a9674
47c49603
471d9592
46759523
45cd94b5
45249448
447b93dc
43d19371
43269307
427a929e
41ce9236
412191cf
40749169
3fc69105
3f1790a1
3e68903e
3db88fdd
3d088f7d
3c578f1d
3ba58ebf
3af38e62
3a408e06
398d8dab
38d98d51
38258cf8
37708ca1
36ba8c4a
36048bf5
354e8ba0
34978b4d
33df8afb
33278aaa
326e8a5a
31b58a0c
30fc89be
30428972
2f878927
2ecc88dd
2e118894
2d55884c
2c998805
2bdc87c0
2b1f877b
2a628738
29a486f6
28e586b6
28278676
27688637
26a885fa
25e885be
25288583
24678549
23a78511
22e584d9
222484a3
2162846e
209f843a
1fdd8407
1f1a83d6
1e5783a6
1d938377
1cd08349
1c0c831c
1b4782f1
1a8382c6
19be829d
18f98276
1833824f
176e822a
16a88205
15e281e2
151c81c1
145581a0
138f8181
12c88163
12018146
113a812a
10738110
0fab80f6
0ee480de
0e1c80c8
0d5480b2
0c8c809e
0bc4808b
0afb8079
0a338068
096b8059
08a2804b
07d9803e
07118032
06488027
057f801e
04b68016
03ed800f
0324800a
025b8006
01928002
00c98001
00008000
ff378001
fe6e8002
fda58006
fcdc800a
fc13800f
fb4a8016
fa81801e
f9b88027
f8ef8032
f827803e
f75e804b
f6958059
f5cd8068
f5058079
f43c808b
f374809e
f2ac80b2
f1e480c8
f11c80de
f05580f6
ef8d8110
eec6812a
edff8146
ed388163
ec718181
ebab81a0
eae481c1
ea1e81e2
e9588205
e892822a
e7cd824f
e7078276
e642829d
e57d82c6
e4b982f1
e3f4831c
e3308349
e26d8377
e1a983a6
e0e683d6
e0238407
df61843a
de9e846e
dddc84a3
dd1b84d9
dc598511
db998549
dad88583
da1885be
d95885fa
d8988637
d7d98676
d71b86b6
d65c86f6
d59e8738
d4e1877b
d42487c0
d3678805
d2ab884c
d1ef8894
d13488dd
d0798927
cfbe8972
cf0489be
ce4b8a0c
cd928a5a
ccd98aaa
cc218afb
cb698b4d
cab28ba0
c9fc8bf5
c9468c4a
c8908ca1
c7db8cf8
c7278d51
c6738dab
c5c08e06
c50d8e62
c45b8ebf
c3a98f1d
c2f88f7d
c2488fdd
c198903e
c0e990a1
c03a9105
bf8c9169
bedf91cf
be329236
bd86929e
bcda9307
bc2f9371
bb8593dc
badc9448
ba3394b5
b98b9523
b8e39592
b83c9603
b7969674
b6f196e6
b64c9759
b5a897ce
b5059843
b46298b9
b3c09930
b31f99a9
b27f9a22
b1df9a9c
b1409b17
b0a29b94
b0059c11
af689c8f
aecc9d0e
ae319d8e
ad979e0f
acfd9e91
ac659f14
abcd9f98
ab36a01c
aaa0a0a2
aa0aa129
a976a1b0
a8e2a238
a84fa2c2
a7bda34c
a72ca3d7
a69ca463
a60ca4f0
a57ea57e
a4f0a60c
a463a69c
a3d7a72c
a34ca7bd
a2c2a84f
a238a8e2
a1b0a976
a129aa0a
a0a2aaa0
a01cab36
9f98abcd
9f14ac65
9e91acfd
9e0fad97
9d8eae31
9d0eaecc
9c8faf68
9c11b005
9b94b0a2
9b17b140
9a9cb1df
9a22b27f
99a9b31f
9930b3c0
98b9b462
9843b505
97ceb5a8
9759b64c
96e6b6f1
9674b796
9603b83c
9592b8e3
9523b98b
94b5ba33
9448badc
93dcbb85
9371bc2f
9307bcda
929ebd86
9236be32
91cfbedf
9169bf8c
9105c03a
90a1c0e9
903ec198
8fddc248
8f7dc2f8
8f1dc3a9
8ebfc45b
8e62c50d
8e06c5c0
8dabc673
8d51c727
8cf8c7db
8ca1c890
8c4ac946
8bf5c9fc
8ba0cab2
8b4dcb69
8afbcc21
8aaaccd9
8a5acd92
8a0cce4b
89becf04
8972cfbe
8927d079
88ddd134
8894d1ef
884cd2ab
8805d367
87c0d424
877bd4e1
8738d59e
86f6d65c
86b6d71b
8676d7d9
8637d898
85fad958
85beda18
8583dad8
8549db99
8511dc59
84d9dd1b
84a3dddc
846ede9e
843adf61
8407e023
83d6e0e6
83a6e1a9
8377e26d
8349e330
831ce3f4
82f1e4b9
82c6e57d
829de642
8276e707
824fe7cd
822ae892
8205e958
81e2ea1e
81c1eae4
81a0ebab
8181ec71
8163ed38
8146edff
812aeec6
8110ef8d
80f6f055
80def11c
80c8f1e4
80b2f2ac
809ef374
808bf43c
8079f505
8068f5cd
8059f695
804bf75e
803ef827
8032f8ef
8027f9b8
801efa81
8016fb4a
800ffc13
800afcdc
8006fda5
8002fe6e
8001ff37
