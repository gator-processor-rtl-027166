1DFF
1EFF
1FFF
20FF
21FF
22FF
23FF
24FF
25FF
26FF
27FF
28FF
29FF
2AFF
2BFF
2CFF
2DFF
2EFF
0585
0586
0587
0588
2FFF
30FF
1AFF
31FF
1BFF
32FF
1187
1188
1185
1186
1964
1966
1968
196A
196C
196E
1970
1972
1974
1976
1978
197A
197C
197E
1980
1982
33FF
34FF
35FF
37FF
39FF
3AFF
3BFF
3CFF
3DFF
3FFF
41FF
42FF
43FF
45FF
46FF
47FF
48FF
FFFF
FFFF
49FF
4BFF
FFFF
4CFF
4DFF
4EFF
4FFF
50FF
FFFF
51FF
52FF
FFFF
53FF
54FF
FFFF
FFFF
55FF
57FF
FFFF
58FF
59FF
5AFF
5BFF
5CFF
FFFF
5DFF
5EFF
FFFF
5FFF
1189
FFFF
FFFF
118A
118C
FFFF
118D
118E
118F
1190
1191
FFFF
1192
1193
1794
1795
0B89
FFFF
FFFF
0B8A
0B8C
FFFF
0B8D
0B8E
0B8F
0B90
0B91
FFFF
0B92
0B93
0F94
0F95
0396
0397
0398
0499
039A
039B
039C
FFFF
039E
039F
03A0
03A1
04A2
1984
04A5
60FF
0596
0597
0598
0799
059A
059B
059C
099D
059E
059F
05A0
05A1
07A2
09A3
07A5
09A6
1196
1197
1198
1499
119A
119B
119C
179D
119E
119F
11A0
11A1
14A2
17A3
14A5
17A6
0B96
0B97
0B98
0D99
0B9A
0B9B
0B9C
0F9D
0B9E
0B9F
0BA0
0BA1
0DA2
0FA3
0DA5
0FA6
03A7
03A8
03A9
04AA
03AB
03AC
03AD
FFFF
03AF
03B0
03B1
03B2
04B3
1CFF
04B5
63FF
05A7
05A8
05A9
07AA
05AB
05AC
05AD
09AE
05AF
05B0
05B1
05B2
07B3
09B4
07B5
09B6
11A7
11A8
11A9
14AA
11AB
11AC
11AD
17AE
11AF
11B0
11B1
11B2
14B3
17B4
14B5
17B6
0BA7
0BA8
0BA9
0DAA
0BAB
0BAC
0BAD
0FAE
0BAF
0BB0
0BB1
0BB2
0DB3
0FB4
0DB5
0FB6
