c0
c1
c1
c2
c2
c2
c2
c3
c3
c3
c2
c2
c2
c2
c1
c1
c0
bf
be
bc
bb
b9
b7
b5
b3
b2
b1
b1
b2
b4
b7
bb
c0
c7
d0
d9
e4
ee
f9
04
0f
1a
24
2c
34
39
3d
40
c0
c6
cd
d4
dc
e5
ee
f7
00
09
12
1b
24
2c
33
3a
40
40
3d
39
34
2c
24
1a
0f
04
f9
ee
e4
d9
d0
c7
40
3e
3a
34
2c
23
18
0c
00
f4
e8
dd
d4
cc
c6
c2
40
47
4c
51
55
58
5a
5c
5c
5c
5a
58
55
51
4c
47
40
45
49
4c
4e
4f
4f
4e
4d
4b
49
47
45
44
42
41
c0
bb
b7
b4
b2
b1
b1
b2
b3
b5
b7
b9
bb
bc
be
bf
c0
b9
b4
af
ab
a8
a6
a4
a4
a4
a6
a8
ab
af
b4
b9
c0
c2
c6
cc
d4
dd
e8
f4
00
0c
18
23
2c
34
3a
3e
c0
c0
c3
c7
cc
d4
dc
e6
f1
fc
07
12
1c
27
30
39
40
3a
33
2c
24
1b
12
09
00
f7
ee
e5
dc
d4
cd
c6
40
39
30
27
1c
12
07
fc
f1
e6
dc
d4
cc
c7
c3
c0
40
41
42
44
45
47
49
4b
4d
4e
4f
4f
4e
4c
49
45
40
3f
3f
3e
3e
3e
3e
3d
3d
3d
3e
3e
3e
3e
3f
3f
c0
c1
c1
c2
c2
c2
c2
c3
c3
c3
c2
c2
c2
c2
c1
c1
c0
bf
be
bc
bb
b9
b7
b5
b3
b2
b1
b1
b2
b4
b7
bb
c0
c7
d0
d9
e4
ee
f9
04
0f
1a
24
2c
34
39
3d
40
c0
c6
cd
d4
dc
e5
ee
f7
00
09
12
1b
24
2c
33
3a
40
40
3d
39
34
2c
24
1a
0f
04
f9
ee
e4
d9
d0
c7
40
3e
3a
34
2c
23
18
0c
00
f4
e8
dd
d4
cc
c6
c2
40
47
4c
51
55
58
5a
5c
5c
5c
5a
58
55
51
4c
47
40
45
49
4c
4e
4f
4f
4e
4d
4b
49
47
45
44
42
41
c0
bb
b7
b4
b2
b1
b1
b2
b3
b5
b7
b9
bb
bc
be
bf
c0
b9
b4
af
ab
a8
a6
a4
a4
a4
a6
a8
ab
af
b4
b9
c0
c2
c6
cc
d4
dd
e8
f4
00
0c
18
23
2c
34
3a
3e
c0
c0
c3
c7
cc
d4
dc
e6
f1
fc
07
12
1c
27
30
39
40
3a
33
2c
24
1b
12
09
00
f7
ee
e5
dc
d4
cd
c6
40
39
30
27
1c
12
07
fc
f1
e6
dc
d4
cc
c7
c3
c0
40
41
42
44
45
47
49
4b
4d
4e
4f
4f
4e
4c
49
45
40
3f
3f
3e
3e
3e
3e
3d
3d
3d
3e
3e
3e
3e
3f
3f
