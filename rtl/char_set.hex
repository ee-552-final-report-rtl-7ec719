00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
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
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
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
00
00
00
00
30
30
00
04
04
08
10
20
40
40
00
38
44
4c
54
64
44
38
00
10
30
10
10
10
10
38
00
38
44
04
08
10
20
7c
00
7c
08
10
08
04
44
38
00
08
18
28
48
7c
08
08
00
7c
40
78
04
04
44
38
00
18
20
40
78
44
44
38
00
7c
04
08
10
20
20
20
00
38
44
44
38
44
44
38
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
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
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
44
44
7c
44
44
44
00
78
44
44
78
44
44
78
00
38
44
40
40
40
44
38
00
70
48
44
44
44
48
70
00
7c
40
40
78
40
40
7c
00
7c
40
40
78
40
40
40
00
38
44
40
5c
44
44
3c
00
44
44
44
7c
44
44
44
00
38
10
10
10
10
10
38
00
1c
08
08
08
08
48
30
00
44
48
50
60
50
48
44
00
40
40
40
40
40
40
7c
00
44
6c
54
54
44
44
44
00
44
44
64
54
4c
44
44
00
38
44
44
44
44
44
38
00
78
44
44
78
40
40
40
00
38
44
44
44
54
48
34
00
78
44
44
78
50
48
44
00
3c
40
40
38
04
04
78
00
7c
10
10
10
10
10
10
00
44
44
44
44
44
44
38
00
44
44
44
44
44
28
10
00
44
44
44
54
54
54
28
00
44
44
28
10
28
44
44
00
44
44
28
10
10
10
10
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
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
00
