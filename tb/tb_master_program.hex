@0
00020c02
00021c00
00022800
00800801
00801c00
00c01802
00802c00
00c01c04
10000009
00023c02
00c02c00
00c01c04
10000000
@20
00000005
0000abcd
00001111
00000007
