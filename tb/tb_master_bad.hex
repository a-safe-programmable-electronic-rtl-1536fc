@0
00020010
