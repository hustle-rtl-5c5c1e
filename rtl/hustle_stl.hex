fe810113
00513023
00613423
00713823
123452b7
6782829b
0f0f1337
f0f3031b
006283b3
0053c3b3
00339293
0053d313
0062e3b3
405383b3
0063f2b3
005383b3
00044337
00e3031b
00638663
00100293
34029073
00013283
00813303
01013383
01810113
30200073
