@0
10c02c02
00000007
@10
0000beef
