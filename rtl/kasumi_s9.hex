0a7
0ef
0a1
17b
187
14e
009
152
026
0e2
030
166
1c4
181
05a
18d
0b7
0fd
093
14b
19f
154
033
16a
132
1f4
106
052
0d8
09f
164
0b1
0af
0f1
1e9
025
0ce
011
000
14d
02c
0fe
17a
03a
08f
0dc
051
190
05f
003
13b
0f5
036
0eb
0da
195
1d8
108
0ac
1ee
173
122
18f
04c
0a5
0c5
18b
079
101
1e0
1a7
0d4
0f0
01c
1ce
0b0
196
1fb
120
0df
1f5
197
0f9
109
059
0ba
0dd
1ac
0a4
04a
1b8
0c4
1ca
1a5
15e
0a3
0e8
09e
086
162
00d
0fa
1eb
08e
0bf
045
0c1
1a9
098
0e3
16e
087
158
12c
114
0f2
1b5
140
071
116
00b
0f3
057
13d
024
05d
1f0
01b
1e7
1be
1e2
029
044
09c
1c9
083
146
193
153
014
027
073
1ba
07c
1db
180
1fc
035
070
0aa
1df
097
07e
0a9
049
10c
117
141
0a8
16c
16b
124
02e
1f3
189
147
144
018
1c8
10b
09d
1cc
1e8
1aa
135
0e5
1b7
1fa
0d0
10f
15d
191
1b2
0ec
010
0d1
167
034
038
078
0c7
115
1d1
1a0
0fc
11f
0f6
006
053
131
1a4
159
099
1f6
041
03d
0f4
11a
0ad
0de
1a2
043
182
170
105
065
1dc
123
0c3
1ae
031
04f
0a6
14a
118
17f
175
080
17e
198
09b
1ef
16f
184
112
06b
1cb
1a1
03e
1c6
084
0e1
0cb
13c
0ea
00e
12d
05b
1f7
11e
1a8
0d3
15b
133
08c
176
023
067
07d
1ab
013
0d6
1c5
092
1f2
13a
1bc
0e6
100
149
0c6
11d
032
074
04e
19a
00a
0cd
1fe
0ab
0e7
02d
08b
1d3
01d
056
1f9
020
048
01a
156
096
139
1ea
1af
0ee
19b
145
095
1d9
028
077
0ae
163
0b9
0e9
185
047
1c0
111
174
037
06e
0b2
142
00c
1d5
188
171
0be
001
06d
177
089
0b5
058
04b
134
104
1e4
062
110
172
113
19c
06f
150
13e
004
1f8
1ec
103
130
04d
151
1b3
015
165
12f
14c
1e3
012
02f
055
019
1f1
1da
121
064
10d
128
1de
10e
06a
01f
068
1b1
054
19e
1e6
18a
060
063
09a
1ff
094
19d
169
199
0ff
0a2
0d7
12e
0c9
10a
15f
157
090
1b9
16d
06c
12a
0fb
022
0b6
1fd
08a
0d2
14f
085
137
160
148
08d
18c
15a
07b
13f
1c2
119
1ad
0e4
1bb
1e1
05c
194
1e5
1a6
0f8
129
017
0d5
082
1d2
016
0d9
11b
046
126
168
1a3
07f
138
179
007
1d4
0c2
002
075
127
1cf
102
0e0
1bf
0f7
0bb
050
18e
11c
161
069
186
12b
1d7
1d6
0b8
039
0c8
15c
03f
0cc
0bc
021
1c3
061
01e
136
0db
05e
0a0
081
1ed
040
0b3
107
066
0bd
0cf
072
192
1b6
1dd
183
07a
0c0
02a
17d
005
091
076
0b4
1c1
125
143
088
17c
02b
042
03c
1c7
155
1bd
0ca
1b0
008
0ed
00f
178
1b4
1d0
03b
1cd
