00
4c
98
db
31
0a
b7
83
62
56
14
2f
6f
2c
07
4b
c4
dd
ac
ba
28
46
5e
3f
de
bf
58
36
0e
18
96
8f
89
ca
bb
f7
59
6d
75
4e
50
6b
8c
b8
bc
f0
7e
3d
bd
ab
7f
66
b0
d1
6c
02
1c
72
30
51
2d
34
1f
09
13
82
95
0b
77
91
ef
06
b2
5b
da
3c
ea
74
9c
0d
a0
64
d6
1d
19
aa
71
cd
79
c5
e1
52
fc
37
7a
be
7b
e5
57
c6
fe
17
cc
2a
61
87
a3
4a
d8
49
04
9a
38
f3
e4
20
60
dc
a2
11
5a
e9
68
d4
3e
fa
12
d9
26
ed
05
c1
2b
97
16
a5
ee
5d
23
9f
df
1b
0c
c7
65
fb
b6
27
b5
5c
78
9e
d5
33
e8
01
39
a8
1a
84
41
85
c8
03
ad
1e
3a
86
32
8e
55
e6
e2
29
9b
5f
f2
63
8b
15
c3
25
a4
4d
f9
10
6e
88
f4
6a
7d
ec
f6
e0
cb
d2
ae
cf
8d
e3
fd
93
2e
4f
99
80
54
42
c2
81
0f
43
47
73
94
af
b1
8a
92
a6
08
44
35
76
70
69
e7
f1
c9
a7
40
21
c0
a1
b9
d7
45
53
22
3b
b4
f8
d3
90
d0
eb
a9
9d
7c
48
f5
ce
24
67
b3
ff
