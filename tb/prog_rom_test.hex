03
0a
11
18
1f
26
2d
34
3b
42
49
50
57
5e
65
6c
73
7a
81
88
8f
96
9d
a4
ab
b2
b9
c0
c7
ce
d5
dc
e3
ea
f1
f8
ff
06
0d
14
1b
22
29
30
37
3e
45
4c
53
5a
61
68
6f
76
7d
84
8b
92
99
a0
a7
ae
b5
bc
