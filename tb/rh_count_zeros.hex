// Zero-counting program: the ones-counting program with the two branches of
// the level-2 test of x2 swapped (words 24 and 25), so a3 counts zero bits.
11
11
14
10
14
10
14
10
14
14
10
10
10
10
10
10
20
20
21
21
22
22
23
23
23
22
20
20
20
20
20
20
40
41
41
41
40
40
40
40
80
80
80
80
82
80
80
80
101
102
104
10c
100
100
100
100
