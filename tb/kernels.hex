00008137
61c00293
76c00313
0062f863
0002a023
00428293
ff5ff06f
07c000ef
0000006f
00050713
02050863
00000513
00551793
40a78533
00671783
00a79793
00471683
00d7c7b3
00a78533
00072703
fe0710e3
00008067
00000513
00008067
00050793
02058663
00000513
0100006f
00179793
0015d593
00058a63
0015f713
fe0708e3
00f50533
fe9ff06f
00008067
00058513
00008067
fb010113
04112623
04812423
04912223
05212023
03312e23
03412c23
03512a23
03612823
03712623
03812423
03912223
800007b7
0107a403
61c00693
00000593
00000613
00700713
00003837
03980813
01400893
00871793
40e787b3
00379793
00e787b3
00779793
00e787b3
00379793
40e787b3
00579513
00a787b3
00279793
40e787b3
00279793
00e78733
01070733
00058513
00068593
01075793
3ff7f793
00f69223
00c69323
00a6a023
00160613
00868693
fb1610e3
6b400493
00048513
ecdff0ef
00002737
00a72023
00000713
0080006f
00078493
0004a783
00e4a023
00048713
fe0798e3
00048513
ea1ff0ef
000027b7
00a7a223
00012423
0140006f
00810693
00f5a023
00b6a023
02048a63
00048593
0004a483
00812783
fe0782e3
00459603
00810693
00479703
fce64ce3
00078693
0007a783
fe0798e3
fc9ff06f
00812503
e49ff0ef
000027b7
00a7a423
61c00b13
0c0b0a93
108b0b13
000b0e93
000a8e13
000108b7
fec88893
00000813
00600313
01600f13
000e8593
000e0613
00088713
00000693
00e61023
00d847b3
00279513
00a787b3
ff778793
00f59023
00168693
00370713
01071713
01075713
00260613
00258593
fc6698e3
00180813
00788893
01089893
0108d893
00ce0e13
00ce8e93
fbe892e3
048a8c93
00000b93
054b0c13
0500006f
00398993
0039d793
0137c7b3
00fb8bb3
002a0a13
034c0863
fb8a0493
000a8913
00000993
00049583
00091503
db5ff0ef
00a989b3
00290913
00c48493
fe9a14e3
fc1ff06f
00ca8a93
015c8663
048b0a13
fc9ff06f
000027b7
0177a623
00012423
00012623
00012823
00012a23
00012c23
00012e23
5e800613
00000713
03500793
02c00813
00400893
5d400513
00900313
00e00f13
02e00e93
00000e13
02c0006f
00271793
02078793
002787b3
fe87a703
00170713
fee7a423
000e0713
00160613
00064783
0e078263
fd078ce3
fd078693
0ff6f593
fee8e4e3
00271693
00a686b3
0006a683
00068067
0bd78063
02e00713
00f76e63
fd578793
0fd7f793
00100713
fa078ee3
00500713
fb5ff06f
00900793
08b7e063
00100713
fa5ff06f
fab370e3
02e00713
06e78a63
06500693
00500713
f8d796e3
00300713
f85ff06f
f8b370e3
06500693
00500713
f6d79ae3
00300713
f6dff06f
fd578793
0ff7f793
04ff6263
00008737
fe570713
00f757b3
0017f793
00500713
40f70733
f45ff06f
f4b370e3
00500713
f39ff06f
00200713
f31ff06f
00500713
f29ff06f
00200713
f21ff06f
00500713
f19ff06f
00810713
02010613
00479793
00072683
00f6f693
00f6e7b3
00470713
fee616e3
00002737
00f72823
04000813
00000793
00100593
000038b7
03988893
ffffa537
00150513
03c0006f
0017d793
fff60613
02060463
00f6c733
00177713
0016d693
fe0704e3
0017d793
00a7c7b3
01079793
0107d793
fd9ff06f
fff80813
04080863
00859713
40b70733
00371713
00b70733
00771713
00b70733
00371713
40b70733
00571693
00d70733
00271713
40b70733
00271713
00b705b3
011585b3
0105d693
0ff6f693
00800613
f8dff06f
00002737
00f72a23
000027b7
0007a503
01472583
b59ff0ef
000027b7
00c78793
0007a783
00f50733
000027b7
00e7ac23
800007b7
0107a703
40870733
000027b7
00e7ae23
000067b7
00d78793
80000737
00f72023
00002337
00900893
02470713
800005b7
02058593
ffc00813
00a00e93
00002e37
020e0e13
04c0006f
00072783
0017f793
fe079ce3
00c5a023
ffc68693
01068e63
00d557b3
00f7f793
03778613
fcf8eee3
03078613
fd5ff06f
00072783
0017f793
fe079ce3
01d5a023
00430313
01c30863
00032503
01c00693
fc9ff06f
800007b7
60000713
00e7a023
0000006f
00000368
0000039c
000003bc
000003d4
000003fc
32313035
322e312c
312d2c35
332c3039
2b2c3765
65352e30
782c332d
372c3231
2c2c6137
2c302e30
2d2c3939
312c2e32
00002c65
