00000007
00000000
