@0
00010c00
10000000
@10
00000002
