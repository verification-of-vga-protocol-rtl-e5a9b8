00ff5a
01fe5b
02fd58
03fc59
04fb5e
05fa5f
06f95c
07f85d
08f752
09f653
0af550
0bf451
0cf356
0df257
0ef154
0ff055
10ef4a
11ee4b
12ed48
13ec49
14eb4e
15ea4f
16e94c
17e84d
18e742
19e643
1ae540
1be441
1ce346
1de247
1ee144
1fe045
20df7a
21de7b
22dd78
23dc79
24db7e
25da7f
26d97c
27d87d
28d772
29d673
2ad570
2bd471
2cd376
2dd277
2ed174
2fd075
30cf6a
31ce6b
32cd68
33cc69
34cb6e
35ca6f
36c96c
37c86d
38c762
39c663
3ac560
3bc461
3cc366
3dc267
3ec164
3fc065
40bf1a
41be1b
42bd18
43bc19
44bb1e
45ba1f
46b91c
47b81d
48b712
49b613
4ab510
4bb411
4cb316
4db217
4eb114
4fb015
50af0a
51ae0b
52ad08
53ac09
54ab0e
55aa0f
56a90c
57a80d
58a702
59a603
5aa500
5ba401
5ca306
5da207
5ea104
5fa005
609f3a
619e3b
629d38
639c39
649b3e
659a3f
66993c
67983d
689732
699633
6a9530
6b9431
6c9336
6d9237
6e9134
6f9035
708f2a
718e2b
728d28
738c29
748b2e
758a2f
76892c
77882d
788722
798623
7a8520
7b8421
7c8326
7d8227
7e8124
7f8025
807fda
817edb
827dd8
837cd9
847bde
857adf
8679dc
8778dd
8877d2
8976d3
8a75d0
8b74d1
8c73d6
8d72d7
8e71d4
8f70d5
906fca
916ecb
926dc8
936cc9
946bce
956acf
9669cc
9768cd
9867c2
9966c3
9a65c0
9b64c1
9c63c6
9d62c7
9e61c4
9f60c5
a05ffa
a15efb
a25df8
a35cf9
a45bfe
a55aff
a659fc
a758fd
a857f2
a956f3
aa55f0
ab54f1
ac53f6
ad52f7
ae51f4
af50f5
b04fea
b14eeb
b24de8
b34ce9
b44bee
b54aef
b649ec
b748ed
b847e2
b946e3
ba45e0
bb44e1
bc43e6
bd42e7
be41e4
bf40e5
c03f9a
c13e9b
c23d98
c33c99
c43b9e
c53a9f
c6399c
c7389d
c83792
c93693
ca3590
cb3491
cc3396
cd3297
ce3194
cf3095
d02f8a
d12e8b
d22d88
d32c89
d42b8e
d52a8f
d6298c
d7288d
d82782
d92683
da2580
db2481
dc2386
dd2287
de2184
df2085
e01fba
e11ebb
e21db8
e31cb9
e41bbe
e51abf
e619bc
e718bd
e817b2
e916b3
ea15b0
eb14b1
ec13b6
ed12b7
ee11b4
ef10b5
f00faa
f10eab
f20da8
f30ca9
f40bae
f50aaf
f609ac
f708ad
f807a2
f906a3
fa05a0
fb04a1
fc03a6
fd02a7
fe01a4
ff00a5
