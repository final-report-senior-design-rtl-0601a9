5a3c
5b3d
583e
593f
5e38
5f39
5c3a
5d3b
5234
5335
5036
5137
5630
5731
5432
5533
4a2c
4b2d
482e
492f
4e28
4f29
4c2a
4d2b
4224
4325
4026
4127
4620
4721
4422
4523
7a1c
7b1d
781e
791f
7e18
7f19
7c1a
7d1b
7214
7315
7016
7117
7610
7711
7412
7513
6a0c
6b0d
680e
690f
6e08
6f09
6c0a
6d0b
6204
6305
6006
6107
6600
6701
6402
6503
1a7c
1b7d
187e
197f
1e78
1f79
1c7a
1d7b
1274
1375
1076
1177
1670
1771
1472
1573
0a6c
0b6d
086e
096f
0e68
0f69
0c6a
0d6b
0264
0365
0066
0167
0660
0761
0462
0563
3a5c
3b5d
385e
395f
3e58
3f59
3c5a
3d5b
3254
3355
3056
3157
3650
3751
3452
3553
2a4c
2b4d
284e
294f
2e48
2f49
2c4a
2d4b
2244
2345
2046
2147
2640
2741
2442
2543
