@0
00106c02
0010d800
0010e801
0010f802
00110803
00111804
00112805
00113806
0010680c
0010680d
0010680e
0010680f
00106810
00106811
00107c04
10000010
00107c02
00100c00
00800c00
00801c00
00108c00
00802c00
00c01807
00101c00
00807c00
00803c00
00109c00
0010ac00
0080cc00
0080dc00
0080ec00
00c01808
00c0180c
00c0180d
00c0180e
00102c00
00808c00
00804c00
00103c00
00807c00
00106c00
00805c00
0080fc00
00c01809
00c0180f
00103c00
00807c00
00107c00
00806c00
00810c00
00c0180a
00c01810
00104c00
00809c00
0080ac00
00c0180b
00105c00
0080bc00
00107c00
0010bc00
0010cc00
00811c00
00c01811
10000010
@100
00000001
00000002
00000003
00000004
00000005
00000006
00000000
00000001
00000001
00000200
00000000
00000001
0000000e
0000fb00
00000500
00000000
00000180
00000000
00000300
0000fd00
