00
6d
f1
8f
3d
80
b4
31
50
82
3f
2e
51
0f
1c
c1
a0
c4
25
12
5d
67
a4
65
81
1e
e0
1d
38
e5
97
05
19
f3
da
03
ba
91
07
b5
9e
7f
c7
77
32
76
a3
e1
98
93
94
5c
7e
17
c2
0a
70
43
cb
a6
5e
ac
7c
a1
8b
a5
d6
2a
18
ed
c0
57
9a
6b
23
06
88
08
2b
cd
24
7b
d2
2c
e7
59
69
dc
9f
0e
61
75
20
89
fc
ff
0c
bd
27
9d
16
b9
86
fd
73
d7
b1
5a
f0
5f
14
40
74
e3
df
d5
f2
36
e6
64
2f
e9
92
e4
fa
71
be
b2
9c
ce
41
42
b6
63
87
a2
30
29
cc
ef
8c
68
c6
3c
4a
66
b0
c9
bc
dd
8e
45
21
90
d1
ae
1f
62
56
db
48
96
f6
ab
8d
a7
58
b7
22
f8
ec
28
0d
f7
bb
f5
2d
6a
4d
fe
eb
0b
01
13
52
ea
7a
10
f9
72
7d
8a
6c
6e
34
95
d0
c5
6f
49
ee
4b
b3
4c
af
3b
a8
4f
4e
39
c3
9b
a9
84
78
11
60
55
aa
85
15
02
fb
09
37
ca
79
47
3e
f4
d8
e2
53
d9
26
3a
99
e8
c8
33
de
54
5b
b8
1a
83
46
35
d3
ad
44
d4
bf
04
cf
1b
