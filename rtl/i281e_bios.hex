3005
3403
4100
700a
f401
3cee
a000
2800
c900
c80f
e600
a401
a802
3c01
b304
9704
8801
d600
f801
3cee
fc01
3cee
fa45
f944
f001
ff42
f701
ff40
da00
f601
ff3d
fb01
ff3b
fd01
ff39
f138
f301
ff36
307f
5001
f201
ff32
f531
f401
ff2f
3000
3400
380a
4600
7801
f7fd
a403
1210
3c10
1f01
9301
6100
a004
a406
3001
0000
3033
a006
3480
3054
1400
3001
1600
1081
3881
1901
30ff
1400
30ca
3c03
1e80
3800
ff32
a407
a808
3000
0000
8c06
ac09
3801
fe00
3cee
ac0a
2f00
30a5
a07f
ffff
30ba
a07f
fffc
