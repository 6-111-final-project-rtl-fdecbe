00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
10
10
10
10
10
00
10
00
00
00
00
00
28
28
28
00
00
00
00
00
00
00
00
00
28
28
7c
28
7c
28
28
00
00
00
00
00
10
3c
50
38
14
78
10
00
00
00
00
00
60
64
08
10
20
4c
0c
00
00
00
00
00
30
48
50
20
54
48
34
00
00
00
00
00
30
10
20
00
00
00
00
00
00
00
00
00
08
10
20
20
20
10
08
00
00
00
00
00
20
10
08
08
08
10
20
00
00
00
00
00
00
28
10
7c
10
28
00
00
00
00
00
00
00
10
10
7c
10
10
00
00
00
00
00
00
00
00
00
00
30
10
20
00
00
00
00
00
00
00
00
7c
00
00
00
00
00
00
00
00
00
00
00
00
00
30
30
00
00
00
00
00
00
04
08
10
20
40
00
00
00
00
00
00
38
44
4c
54
64
44
38
00
00
00
00
00
10
30
10
10
10
10
38
00
00
00
00
00
38
44
04
08
10
20
7c
00
00
00
00
00
7c
08
10
08
04
44
38
00
00
00
00
00
08
18
28
48
7c
08
08
00
00
00
00
00
7c
40
78
04
04
44
38
00
00
00
00
00
18
20
40
78
44
44
38
00
00
00
00
00
7c
04
08
10
20
20
20
00
00
00
00
00
38
44
44
38
44
44
38
00
00
00
00
00
38
44
44
3c
04
08
30
00
00
00
00
00
00
30
30
00
30
30
00
00
00
00
00
00
00
30
30
00
30
10
20
00
00
00
00
00
04
08
10
20
10
08
04
00
00
00
00
00
00
00
7c
00
7c
00
00
00
00
00
00
00
40
20
10
08
10
20
40
00
00
00
00
00
38
44
04
08
10
00
10
00
00
00
00
00
38
44
04
34
54
54
38
00
00
00
00
00
38
44
44
44
7c
44
44
00
00
00
00
00
78
44
44
78
44
44
78
00
00
00
00
00
38
44
40
40
40
44
38
00
00
00
00
00
70
48
44
44
44
48
70
00
00
00
00
00
7c
40
40
78
40
40
7c
00
00
00
00
00
7c
40
40
70
40
40
40
00
00
00
00
00
38
44
40
40
4c
44
38
00
00
00
00
00
44
44
44
7c
44
44
44
00
00
00
00
00
38
10
10
10
10
10
38
00
00
00
00
00
1c
08
08
08
08
48
30
00
00
00
00
00
44
48
50
60
50
48
44
00
00
00
00
00
40
40
40
40
40
40
7c
00
00
00
00
00
44
6c
54
44
44
44
44
00
00
00
00
00
44
44
64
54
4c
44
44
00
00
00
00
00
38
44
44
44
44
44
38
00
00
00
00
00
78
44
44
78
40
40
40
00
00
00
00
00
38
44
44
44
54
48
34
00
00
00
00
00
78
44
44
78
50
48
44
00
00
00
00
00
3c
40
40
38
04
04
78
00
00
00
00
00
7c
10
10
10
10
10
10
00
00
00
00
00
44
44
44
44
44
44
38
00
00
00
00
00
44
44
44
44
44
28
10
00
00
00
00
00
44
44
44
54
54
6c
44
00
00
00
00
00
44
44
28
10
28
44
44
00
00
00
00
00
44
44
28
10
10
10
10
00
00
00
00
00
7c
04
08
10
20
40
7c
00
00
00
00
00
1c
10
10
10
10
10
1c
00
00
00
00
00
00
40
20
10
08
04
00
00
00
00
00
00
70
10
10
10
10
10
70
00
00
00
00
00
10
28
44
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
7c
00
00
00
00
00
20
10
08
00
00
00
00
00
00
00
00
00
00
00
38
04
3c
44
3c
00
00
00
00
00
40
40
58
64
44
44
78
00
00
00
00
00
00
00
38
40
40
44
38
00
00
00
00
00
04
04
34
4c
44
44
3c
00
00
00
00
00
00
00
38
44
7c
40
38
00
00
00
00
00
18
24
20
70
20
20
20
00
00
00
00
00
00
00
3c
44
3c
04
18
00
00
00
00
00
40
40
58
64
44
44
44
00
00
00
00
00
10
00
30
10
10
10
38
00
00
00
00
00
08
00
18
08
08
48
30
00
00
00
00
00
20
20
24
28
30
28
24
00
00
00
00
00
30
10
10
10
10
10
38
00
00
00
00
00
00
00
68
54
54
44
44
00
00
00
00
00
00
00
58
64
44
44
44
00
00
00
00
00
00
00
38
44
44
44
38
00
00
00
00
00
00
00
78
44
78
40
40
00
00
00
00
00
00
00
34
4c
3c
04
04
00
00
00
00
00
00
00
58
64
40
40
40
00
00
00
00
00
00
00
38
40
38
04
78
00
00
00
00
00
20
20
70
20
20
24
18
00
00
00
00
00
00
00
44
44
44
4c
34
00
00
00
00
00
00
00
44
44
44
28
10
00
00
00
00
00
00
00
44
44
54
54
28
00
00
00
00
00
00
00
44
28
10
28
44
00
00
00
00
00
00
00
44
44
3c
04
38
00
00
00
00
00
00
00
7c
08
10
20
7c
00
00
00
00
00
08
10
10
20
10
10
08
00
00
00
00
00
10
10
10
10
10
10
10
00
00
00
00
00
20
10
10
08
10
10
20
00
00
00
00
00
00
10
08
7c
08
10
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
