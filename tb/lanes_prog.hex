cc010000
8c040000
64220005
78421818
ec030004
08000005
00000000
