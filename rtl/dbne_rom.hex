2f454
2f454
22695
200a1
1a57b
17f87
15993
1339f
10dab
0e7b7
0c1c3
1439a
11da6
19f7d
17989
1fb60
20a9e
28c75
30e4c
2e858
36a2f
3ec06
117a8
1997f
25088
2d25f
35436
3d60d
101af
18386
23a8f
36431
08fd3
111aa
2707e
2f255
01df7
14799
2a66d
32844
053e6
17d88
2dc5c
007fe
131a0
29074
3ba16
0e5b8
2448c
017f9
1419b
2a06f
3ca11
19d7e
2fc52
0cfbf
1f961
35835
12ba2
28a76
05de3
18785
38e24
16191
