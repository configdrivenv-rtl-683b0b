2398
12fb
3336
4071
310e
12ff
12e5
121b
4038
33d8
41e5
134b
4339
2394
4137
20a8
1226
235b
1181
3190
0032
4184
02d1
0240
2032
0165
0086
0358
3206
412b
40af
00c7
40b8
12ad
4365
4375
33bf
13e1
4003
0066
2006
134c
00ce
1199
20db
1021
024a
33fa
024a
3101
21a1
11d8
018c
2352
419e
1315
0295
43a0
438e
4210
428b
0072
01e9
10fd
2002
4150
22bc
4162
01d6
2149
2193
4302
3167
41d5
10f9
2079
21a1
035a
03ba
0136
00ca
3290
1222
329e
20bc
407b
0090
22eb
32c6
0323
32e3
42a0
33c0
025f
2069
40e1
315c
1338
239d
036b
