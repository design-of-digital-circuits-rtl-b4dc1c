// Ones-counting program for the 2-level RFSM, one word per line:
// {WE output RAM, WE mux RAM 2, WE mux RAM 1, WE level RAM 2, WE level RAM 1, 4 data bits}.
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
22
23
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
