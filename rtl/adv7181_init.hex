1500
1741
3a16
5004
c305
c480
0e80
5020
5218
58ed
77c5
7c93
7d00
d048
d5a0
d7ea
e43e
ea0f
3112
3281
3384
37a0
e580
e603
e785
5000
5100
0050
1000
0402
0860
0a18
1100
2b00
2c8c
2df8
2eee
2ff4
30d2
0e05
