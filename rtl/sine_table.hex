0000
0648
0c8c
12c8
18f9
1f1a
2528
2b1f
30fb
36ba
3c56
41ce
471c
4c3f
5133
55f5
5a82
5ed7
62f1
66cf
6a6d
6dc9
70e2
73b5
7641
7884
7a7c
7c29
7d89
7e9c
7f61
7fd8
7fff
7fd8
7f61
7e9c
7d89
7c29
7a7c
7884
7641
73b5
70e2
6dc9
6a6d
66cf
62f1
5ed7
5a82
55f5
5133
4c3f
471c
41ce
3c56
36ba
30fb
2b1f
2528
1f1a
18f9
12c8
0c8c
0648
0000
f9b8
f374
ed38
e707
e0e6
dad8
d4e1
cf05
c946
c3aa
be32
b8e4
b3c1
aecd
aa0b
a57e
a129
9d0f
9931
9593
9237
8f1e
8c4b
89bf
877c
8584
83d7
8277
8164
809f
8028
8001
8028
809f
8164
8277
83d7
8584
877c
89bf
8c4b
8f1e
9237
9593
9931
9d0f
a129
a57e
aa0b
aecd
b3c1
b8e4
be32
c3aa
c946
cf05
d4e1
dad8
e0e6
e707
ed38
f374
f9b8
