00555500
05555550
55775775
55705705
55555555
55555555
55050550
50050500
