000
003
005
008
00a
00d
00f
012
014
017
019
01c
01f
021
024
026
029
02b
02e
030
033
035
038
03a
03d
03f
042
045
047
04a
04c
04f
051
054
056
059
05b
05e
060
063
065
068
06a
06c
06f
071
074
076
079
07b
07e
080
083
085
088
08a
08c
08f
091
094
096
098
09b
09d
0a0
0a2
0a4
0a7
0a9
0ac
0ae
0b0
0b3
0b5
0b7
0ba
0bc
0be
0c1
0c3
0c5
0c8
0ca
0cc
0cf
0d1
0d3
0d6
0d8
0da
0dc
0df
0e1
0e3
0e5
0e8
0ea
0ec
0ee
0f1
0f3
0f5
0f7
0f9
0fc
0fe
100
102
104
106
109
10b
10d
10f
111
113
115
117
11a
11c
11e
120
122
124
126
128
12a
12c
12e
130
132
134
136
138
13a
13c
13e
140
142
144
146
148
14a
14c
14e
150
152
154
156
158
15a
15b
15d
15f
161
163
165
167
168
16a
16c
16e
170
172
173
175
177
179
17b
17c
17e
180
182
183
185
187
189
18a
18c
18e
18f
191
193
195
196
198
19a
19b
19d
19f
1a0
1a2
1a3
1a5
1a7
1a8
1aa
1ac
1ad
1af
1b0
1b2
1b3
1b5
1b7
1b8
1ba
1bb
1bd
1be
1c0
1c1
1c3
1c4
1c6
1c7
1c9
1ca
1cc
1cd
1cf
1d0
1d2
1d3
1d5
1d6
1d7
1d9
1da
1dc
1dd
1df
1e0
1e1
1e3
1e4
1e6
1e7
1e8
1ea
1eb
1ec
1ee
1ef
1f0
1f2
1f3
1f4
1f6
1f7
1f8
1fa
1fb
1fc
1fd
1ff
200
