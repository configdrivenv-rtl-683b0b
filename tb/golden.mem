0079
005c
0043
005b
