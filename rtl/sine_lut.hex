00
01
02
02
03
04
05
05
06
07
08
09
09
0a
0b
0c
0c
0d
0e
0f
10
10
11
12
13
13
14
15
16
16
17
18
19
1a
1a
1b
1c
1d
1d
1e
1f
20
20
21
22
23
23
24
25
26
26
27
28
29
29
2a
2b
2c
2c
2d
2e
2e
2f
30
31
31
32
33
33
34
35
36
36
37
38
38
39
3a
3a
3b
3c
3d
3d
3e
3f
3f
40
41
41
42
43
43
44
45
45
46
47
47
48
48
49
4a
4a
4b
4c
4c
4d
4e
4e
4f
4f
50
51
51
52
52
53
54
54
55
55
56
56
57
58
58
59
59
5a
5a
5b
5b
5c
5d
5d
5e
5e
5f
5f
60
60
61
61
62
62
63
63
64
64
65
65
66
66
66
67
67
68
68
69
69
6a
6a
6a
6b
6b
6c
6c
6d
6d
6d
6e
6e
6f
6f
6f
70
70
70
71
71
71
72
72
72
73
73
73
74
74
74
75
75
75
76
76
76
76
77
77
77
78
78
78
78
79
79
79
79
7a
7a
7a
7a
7a
7b
7b
7b
7b
7b
7c
7c
7c
7c
7c
7c
7d
7d
7d
7d
7d
7d
7d
7e
7e
7e
7e
7e
7e
7e
7e
7e
7e
7e
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7f
7e
7e
7e
7e
7e
7e
7e
7e
7e
7e
7e
7d
7d
7d
7d
7d
7d
7d
7c
7c
7c
7c
7c
7c
7b
7b
7b
7b
7b
7a
7a
7a
7a
7a
79
79
79
79
78
78
78
78
77
77
77
76
76
76
76
75
75
75
74
74
74
73
73
73
72
72
72
71
71
71
70
70
70
6f
6f
6f
6e
6e
6d
6d
6d
6c
6c
6b
6b
6a
6a
6a
69
69
68
68
67
67
66
66
66
65
65
64
64
63
63
62
62
61
61
60
60
5f
5f
5e
5e
5d
5d
5c
5b
5b
5a
5a
59
59
58
58
57
56
56
55
55
54
54
53
52
52
51
51
50
4f
4f
4e
4e
4d
4c
4c
4b
4a
4a
49
48
48
47
47
46
45
45
44
43
43
42
41
41
40
3f
3f
3e
3d
3d
3c
3b
3a
3a
39
38
38
37
36
36
35
34
33
33
32
31
31
30
2f
2e
2e
2d
2c
2c
2b
2a
29
29
28
27
26
26
25
24
23
23
22
21
20
20
1f
1e
1d
1d
1c
1b
1a
1a
19
18
17
16
16
15
14
13
13
12
11
10
10
0f
0e
0d
0c
0c
0b
0a
09
09
08
07
06
05
05
04
03
02
02
01
00
ff
fe
fe
fd
fc
fb
fb
fa
f9
f8
f7
f7
f6
f5
f4
f4
f3
f2
f1
f0
f0
ef
ee
ed
ed
ec
eb
ea
ea
e9
e8
e7
e6
e6
e5
e4
e3
e3
e2
e1
e0
e0
df
de
dd
dd
dc
db
da
da
d9
d8
d7
d7
d6
d5
d4
d4
d3
d2
d2
d1
d0
cf
cf
ce
cd
cd
cc
cb
ca
ca
c9
c8
c8
c7
c6
c6
c5
c4
c3
c3
c2
c1
c1
c0
bf
bf
be
bd
bd
bc
bb
bb
ba
b9
b9
b8
b8
b7
b6
b6
b5
b4
b4
b3
b2
b2
b1
b1
b0
af
af
ae
ae
ad
ac
ac
ab
ab
aa
aa
a9
a8
a8
a7
a7
a6
a6
a5
a5
a4
a3
a3
a2
a2
a1
a1
a0
a0
9f
9f
9e
9e
9d
9d
9c
9c
9b
9b
9a
9a
9a
99
99
98
98
97
97
96
96
96
95
95
94
94
93
93
93
92
92
91
91
91
90
90
90
8f
8f
8f
8e
8e
8e
8d
8d
8d
8c
8c
8c
8b
8b
8b
8a
8a
8a
8a
89
89
89
88
88
88
88
87
87
87
87
86
86
86
86
86
85
85
85
85
85
84
84
84
84
84
84
83
83
83
83
83
83
83
82
82
82
82
82
82
82
82
82
82
82
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
81
82
82
82
82
82
82
82
82
82
82
82
83
83
83
83
83
83
83
84
84
84
84
84
84
85
85
85
85
85
86
86
86
86
86
87
87
87
87
88
88
88
88
89
89
89
8a
8a
8a
8a
8b
8b
8b
8c
8c
8c
8d
8d
8d
8e
8e
8e
8f
8f
8f
90
90
90
91
91
91
92
92
93
93
93
94
94
95
95
96
96
96
97
97
98
98
99
99
9a
9a
9a
9b
9b
9c
9c
9d
9d
9e
9e
9f
9f
a0
a0
a1
a1
a2
a2
a3
a3
a4
a5
a5
a6
a6
a7
a7
a8
a8
a9
aa
aa
ab
ab
ac
ac
ad
ae
ae
af
af
b0
b1
b1
b2
b2
b3
b4
b4
b5
b6
b6
b7
b8
b8
b9
b9
ba
bb
bb
bc
bd
bd
be
bf
bf
c0
c1
c1
c2
c3
c3
c4
c5
c6
c6
c7
c8
c8
c9
ca
ca
cb
cc
cd
cd
ce
cf
cf
d0
d1
d2
d2
d3
d4
d4
d5
d6
d7
d7
d8
d9
da
da
db
dc
dd
dd
de
df
e0
e0
e1
e2
e3
e3
e4
e5
e6
e6
e7
e8
e9
ea
ea
eb
ec
ed
ed
ee
ef
f0
f0
f1
f2
f3
f4
f4
f5
f6
f7
f7
f8
f9
fa
fb
fb
fc
fd
fe
fe
ff
