002
005
008
00b
00e
011
014
018
01b
01e
021
024
027
02a
02d
031
034
037
03a
03d
040
043
046
049
04d
050
053
056
059
05c
05f
062
065
068
06b
06e
071
075
078
07b
07e
081
084
087
08a
08d
090
093
096
099
09c
09f
0a2
0a5
0a8
0ab
0ae
0b1
0b4
0b6
0b9
0bc
0bf
0c2
0c5
0c8
0cb
0ce
0d1
0d3
0d6
0d9
0dc
0df
0e2
0e4
0e7
0ea
0ed
0ef
0f2
0f5
0f8
0fb
0fd
100
103
105
108
10b
10d
110
113
115
118
11b
11d
120
122
125
128
12a
12d
12f
132
134
137
139
13c
13e
141
143
145
148
14a
14d
14f
151
154
156
158
15b
15d
15f
161
164
166
168
16a
16d
16f
171
173
175
177
17a
17c
17e
180
182
184
186
188
18a
18c
18e
190
192
194
196
198
19a
19b
19d
19f
1a1
1a3
1a4
1a6
1a8
1aa
1ab
1ad
1af
1b1
1b2
1b4
1b5
1b7
1b9
1ba
1bc
1bd
1bf
1c0
1c2
1c3
1c5
1c6
1c8
1c9
1cb
1cc
1cd
1cf
1d0
1d1
1d3
1d4
1d5
1d6
1d8
1d9
1da
1db
1dc
1dd
1de
1e0
1e1
1e2
1e3
1e4
1e5
1e6
1e7
1e8
1e9
1e9
1ea
1eb
1ec
1ed
1ee
1ef
1ef
1f0
1f1
1f2
1f2
1f3
1f4
1f4
1f5
1f5
1f6
1f7
1f7
1f8
1f8
1f9
1f9
1fa
1fa
1fb
1fb
1fb
1fc
1fc
1fc
1fd
1fd
1fd
1fd
1fe
1fe
1fe
1fe
1fe
1ff
1ff
1ff
1ff
1ff
1ff
1ff
