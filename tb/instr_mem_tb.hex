52e6b438
f2a74de4
269e0d37
6513270e
a6a3a450
0c5c7fd0
128b2f33
d23f0824
892f902b
1818e811
5d9dc9f8
9531985d
0ed90475
e8e25d94
81e74ef5
36f675cc
