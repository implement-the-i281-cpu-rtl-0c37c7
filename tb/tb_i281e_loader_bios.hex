1200
8c00
3400
1200
8000
1400
1200
8000
1680
5401
d700
f7f7
ff73
