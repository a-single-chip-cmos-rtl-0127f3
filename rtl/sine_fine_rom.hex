a
b
c
d
d
e
f
0
0
1
2
3
3
4
5
6
b
c
c
d
e
e
f
0
0
1
2
2
3
4
4
5
d
d
e
e
e
f
f
0
0
1
1
2
2
2
3
3
f
f
f
f
f
0
0
0
0
0
0
1
1
1
1
1
