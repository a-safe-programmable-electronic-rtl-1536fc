@0
00100c02
00100807
00101c04
10000004
00101c02
00102c00
00103c00
00104c00
00105c00
00106c00
00c01800
00102c00
00103c00
00104c00
00105c00
00107c00
00c01801
00102c00
00103c00
00104c00
00105c00
00108c00
00c01802
00109c00
00800c00
00801c00
00c01803
0010ac00
00803c00
0010bc00
0010cc00
00803c00
0010dc00
00807c00
00c01804
00c01807
0010ec00
00802c00
00c01805
0010fc00
00804c00
00805c00
00c01806
0010ac00
00806c00
00110c00
10000004
@100
00000000
00000001
00000001
00000000
00000100
00000000
00000001
00000002
00000003
00000005
00000003
00000001
00000009
000001f4
00000008
00000007
00000002
