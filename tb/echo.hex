3c1e8000
8fc10004
00000000
1020fffd
00000000
8fc2000c
00000000
8fc30000
00000000
1060fffd
00000000
afc20008
08000001
00000000
