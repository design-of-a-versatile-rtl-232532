0000000000
0002e2a60a
0005c5464f
0008a7e0ce
000b8a7589
000e6d047f
00114f8daf
001432111b
0017148ec3
0019f706a5
001cd978c4
001fbbe51d
00229e4bb3
002580ac84
0028630791
002b455cda
002e27ac5f
003109f620
0033ec3a1d
0036ce7857
0039b0b0cd
003c92e380
003f75106f
004257379b
0045395903
00481b74a8
004afd8a8b
004ddf9aaa
0050c1a506
0053a3a9a0
005685a877
005967a18b
005c4994dd
005f2b826c
00620d6a39
0064ef4c44
0067d1288d
006ab2ff13
006d94cfd8
0070769ada
007358601b
00763a1f9a
00791bd957
007bfd8d53
007edf3b8e
0081c0e407
0084a286bf
00878423b5
008a65baeb
008d474c5f
009028d813
00930a5e06
0095ebde38
0098cd58a9
009baecd5a
009e903c4b
00a171a57b
00a45308ea
00a734669a
00aa15be89
00acf710b9
00afd85d28
00b2b9a3d8
00b59ae4c8
00b87c1ff8
00bb5d5569
00be3e851a
00c11faf0c
00c400d33f
00c6e1f1b2
00c9c30a66
00cca41d5c
00cf852a92
00d2663209
00d54733c2
00d8282fbc
00db0925f7
00ddea1674
00e0cb0133
00e3abe633
00e68cc575
00e96d9ef9
00ec4e72bf
00ef2f40c6
00f2100910
00f4f0cb9d
00f7d1886b
00fab23f7c
00fd92f0d0
0100739c66
010354423e
010634e25a
0109157cb8
010bf61159
010ed6a03d
0111b72965
011497accf
0117782a7d
011a58a26f
011d3914a3
012019811c
0122f9e7d8
0125da48d7
0128baa41b
012b9af9a3
012e7b496e
01315b937e
01343bd7d1
01371c166a
0139fc4f46
013cdc8267
013fbcafcc
01429cd776
01457cf965
01485d1599
014b3d2c11
014e1d3ccf
0150fd47d2
0153dd4d19
0156bd4ca7
01599d4679
015c7d3a91
015f5d28ee
01623d1191
01651cf47a
0167fcd1a8
016adca91d
016dbc7ad7
01709c46d8
01737c0d1e
01765bcdab
01793b887e
017c1b3d98
017efaecf8
0181da969f
0184ba3a8c
018799d8c0
018a79713b
018d5903fd
0190389106
0193181857
0195f799ee
0198d715cd
019bb68bf3
019e95fc60
01a1756716
01a454cc12
01a7342b57
01aa1384e4
01acf2d8b8
01afd226d4
01b2b16f39
01b590b1e6
01b86feedb
01bb4f2618
01be2e579e
01c10d836c
01c3eca983
01c6cbc9e3
01c9aae48c
01cc89f97d
01cf6908b8
01d248123c
01d5271608
01d806141f
01dae50c7e
01ddc3ff27
01e0a2ec19
01e381d355
01e660b4db
01e93f90ab
01ec1e66c4
01eefd3728
01f1dc01d5
01f4bac6cd
01f799860f
01fa783f9b
01fd56f372
020035a193
02031449ff
0205f2ecb5
0208d189b6
020bb02102
020e8eb299
02116d3e7c
02144bc4a9
02172a4521
021a08bfe5
021ce734f4
021fc5a44f
0222a40df5
02258271e7
022860d025
022b3f28ae
022e1d7b84
0230fbc8a5
0233da1013
0236b851cc
0239968dd2
023c74c425
023f52f4c4
0242311faf
02450f44e7
0247ed646c
024acb7e3e
024da9925c
025087a0c8
025365a980
025643ac86
025921a9d9
025bffa179
025edd9367
0261bb7fa2
026499662b
0267774702
026a552226
026d32f799
027010c759
0272ee9167
0275cc55c4
0278aa146e
027b87cd67
027e6580af
0281432e45
028420d629
0286fe785c
0289dc14de
028cb9abaf
028f973ccf
029274c83e
0295524dfb
02982fce08
029b0d4865
029deabd11
02a0c82c0c
02a3a59556
02a682f8f1
02a96056db
02ac3daf15
02af1b019f
02b1f84e79
02b4d595a3
02b7b2d71d
02ba9012e7
02bd6d4902
02c04a796d
02c327a429
02c604c935
02c8e1e892
02cbbf0240
02ce9c163e
02d179248e
02d4562d2f
02d7333021
02da102d64
02dced24f8
02dfca16de
02e2a70315
02e583e99e
02e860ca79
02eb3da5a5
02ee1a7b23
02f0f74af3
02f3d41515
02f6b0d98a
02f98d9850
02fc6a5169
02ff4704d4
030223b291
0305005aa1
0307dcfd04
030ab999ba
030d9630c2
031072c21d
03134f4dcb
03162bd3cd
0319085421
031be4cec9
031ec143c4
03219db312
03247a1cb4
03275680aa
032a32def3
032d0f3790
032feb8a81
0332c7d7c6
0335a41f5f
033880614c
033b5c9d8d
033e38d423
034115050d
0343f1304c
0346cd55df
0349a975c6
034c859003
034f61a494
03523db37a
035519bcb6
0357f5c046
035ad1be2c
035dadb667
036089a8f7
03636595dc
0366417d18
03691d5ea8
036bf93a8f
036ed510cb
0371b0e15d
03748cac46
0377687184
037a443118
037d1feb03
037ffb9f44
0382d74ddb
0385b2f6c9
03888e9a0e
038b6a37a9
038e45cf9b
03912161e4
0393fcee83
0396d8757a
0399b3f6c8
039c8f726d
039f6ae86a
03a24658bd
03a521c369
03a7fd286b
03aad887c6
03adb3e178
03b08f3582
03b36a83e4
03b645cc9e
03b9210fb0
03bbfc4d1a
03bed784dc
03c1b2b6f7
03c48de36a
03c7690a36
03ca442b5a
03cd1f46d7
03cffa5cac
03d2d56cdb
03d5b07763
03d88b7c43
03db667b7d
03de417510
03e11c68fc
03e3f75742
03e6d23fe1
03e9ad22da
03ec88002c
03ef62d7d8
03f23da9de
03f518763e
03f7f33cf8
03facdfe0c
03fda8b97a
0400836f42
04035e1f65
040638c9e2
0409136eb9
040bee0dec
040ec8a779
0411a33b61
04147dc9a3
0417585241
041a32d539
041d0d528d
041fe7ca3c
0422c23c47
04259ca8ac
0428770f6e
042b51708a
042e2bcc03
04310621d7
0433e07207
0436babc93
043995017b
043c6f40bf
043f497a5f
044223ae5c
0444fddcb5
0447d8056a
044ab2287c
044d8c45ea
0450665db6
0453406fde
04561a7c62
0458f48344
045bce8483
045ea8801f
0461827618
04645c666f
0467365123
046a103634
046cea15a3
046fc3ef70
04729dc39a
0475779223
0478515b09
047b2b1e4d
047e04dbef
0480de93f0
0483b8464f
048691f30c
04896b9a27
048c453ba1
048f1ed77a
0491f86db2
0494d1fe48
0497ab893d
049a850e91
049d5e8e44
04a0380856
04a3117cc8
04a5eaeb99
04a8c454c9
04ab9db858
04ae771648
04b1506e97
04b429c145
04b7030e54
04b9dc55c2
04bcb59791
04bf8ed3bf
04c2680a4e
04c5413b3d
04c81a668c
04caf38c3c
04cdccac4c
04d0a5c6bd
04d37edb8f
04d657eac1
04d930f455
04dc09f849
04dee2f69e
04e1bbef55
04e494e26c
04e76dcfe5
04ea46b7c0
04ed1f99fb
04eff87699
04f2d14d98
04f5aa1ef9
04f882eabb
04fb5bb0e0
04fe347167
05010d2c4f
0503e5e19a
0506be9147
0509973b57
050c6fdfc9
050f487e9d
05122117d4
0514f9ab6e
0517d2396a
051aaac1c9
051d83448c
05205bc1b1
052334393a
05260cab25
0528e51774
052bbd7e27
052e95df3d
05316e3ab6
0534469093
05371ee0d4
0539f72b78
053ccf7081
053fa7afed
05427fe9be
0545581df3
0548304c8c
054b087589
054de098eb
0550b8b6b1
055390cedc
055668e16c
055940ee60
055c18f5b9
055ef0f777
0561c8f39a
0564a0ea23
056778db10
056a50c663
056d28ac1b
0570008c39
0572d866bc
0575b03ba4
0578880af3
057b5fd4a7
057e3798c1
05810f5742
0583e71028
0586bec374
0589967127
058c6e1940
058f45bbbf
05921d58a5
0594f4eff1
0597cc81a4
059aa40dbe
059d7b943f
05a0531526
05a32a9075
05a602062b
05a8d97648
05abb0e0cc
05ae8845b7
05b15fa50a
05b436fec5
05b70e52e7
