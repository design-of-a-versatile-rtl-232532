001720d9c07
002e58f7442
0045a887883
005d0fba188
00748ebf124
008c25c7263
00a3d5039ac
00bb9ca64ed
00d37ce1bbf
00eb75e8f90
010387efbcb
011bb32a600
0133f7cde15
014c560fe69
0164ce26c06
017d60496d0
017d60496d0
01960caf9ac
01aed391ab6
01c7b528b71
01e0b1ae8f3
01f9c95dc1d
0212fc719cc
0212fc719cc
022c4b2630e
0245b5b8556
025f3c65ab8
0278df6ca1a
02929f0c772
02929f0c772
02ac7b853ff
02c67517e87
02e08c0638f
02fac092d9f
02fac092d9f
0315130157f
032f8396279
034a1296a9a
034a1296a9a
0364c0492fb
037f8cf5000
039a78e25a6
039a78e25a6
03b5845a7c9
03d0afa7a6c
03d0afa7a6c
03ebfb1520c
040766ef3ea
0422f383658
0422f383658
043ea120113
045a7014d90
045a7014d90
047660b2755
0492734ac4f
0492734ac4f
04aea830d30
04caffb8dc4
04caffb8dc4
04e77a38556
05041805f10
05041805f10
0520d979a57
053dbeecb3b
053dbeecb3b
055ac8b9ad6
0577f73c7bb
0577f73c7bb
05954ad2662
05954ad2662
05b2c3da197
05d062b3af0
05d062b3af0
05ee27c0b3d
060c1364304
060c1364304
062a2602aff
062a2602aff
06486002493
06486002493
0666c1caa5b
06854bc50a6
06854bc50a6
06a3fe5c604
06a3fe5c604
06c2d9fd3d2
06c2d9fd3d2
06e1df15ec7
07010e1678c
07010e1678c
07206770b51
07206770b51
073feb9846b
073feb9846b
075f9b02af1
075f9b02af1
077f7627562
077f7627562
079f7d7f94e
079f7d7f94e
07bfb186c04
07bfb186c04
07e012ba343
07e012ba343
0800a1995f0
0800a1995f0
08215ea5cd4
08215ea5cd4
08424a6335c
08424a6335c
08636557863
08636557863
0884b00aef7
0884b00aef7
08a62b07f34
08a62b07f34
08c7d6db717
08c7d6db717
08e9b414b5b
08e9b414b5b
090bc345862
090bc345862
092e050231e
092e050231e
092e050231e
095079e1a04
095079e1a04
0973227d602
0973227d602
0995ff71b87
0995ff71b87
09b9115db84
09b9115db84
09b9115db84
09dc58e347d
09dc58e347d
09ffd6a73a8
09ffd6a73a8
0a238b51604
0a238b51604
0a238b51604
0a47778c98c
0a47778c98c
0a6b9c06e62
0a6b9c06e62
0a6b9c06e62
0a8ff971811
0a8ff971811
0ab49080ece
0ab49080ece
0ab49080ece
0ad961ed0cc
0ad961ed0cc
0afe6e71394
0afe6e71394
0afe6e71394
0b23b6cc56d
0b23b6cc56d
0b493bc0eca
0b493bc0eca
0b493bc0eca
0b6efe153c8
0b6efe153c8
0b6efe153c8
0b94fe935b8
0b94fe935b8
0bbb3e094b4
0bbb3e094b4
0bbb3e094b4
0be1bd4913f
0be1bd4913f
0be1bd4913f
0c087d28dfb
0c087d28dfb
0c087d28dfb
0c2f7e83163
0c2f7e83163
0c2f7e83163
0c56c23679b
0c56c23679b
0c7e492644d
0c7e492644d
0c7e492644d
0ca6143a496
0ca6143a496
0ca6143a496
0cce245f103
0cce245f103
0cce245f103
0cf67a85fa2
0cf67a85fa2
0cf67a85fa2
0d1f17a5622
0d1f17a5622
0d1f17a5622
0d47fcb8c08
0d47fcb8c08
0d47fcb8c08
0d47fcb8c08
0d712ac0cf8
0d712ac0cf8
0d712ac0cf8
0d9aa2c3b0f
0d9aa2c3b0f
0d9aa2c3b0f
0dc465cd156
0dc465cd156
0dc465cd156
0dee74ee64b
0dee74ee64b
0dee74ee64b
0dee74ee64b
0e18d13ee80
0e18d13ee80
0e18d13ee80
0e437bdbf52
0e437bdbf52
0e437bdbf52
0e6e75e91ba
0e6e75e91ba
0e6e75e91ba
0e6e75e91ba
0e99c090537
0e99c090537
0e99c090537
0ec55d022d8
0ec55d022d8
0ec55d022d8
0ec55d022d8
0ef14c7605d
0ef14c7605d
0ef14c7605d
0ef14c7605d
0f1d902a37b
0f1d902a37b
0f1d902a37b
0f4a2964539
0f4a2964539
0f4a2964539
0f4a2964539
0f771971576
0f771971576
0f771971576
0f771971576
0fa461a5e8f
0fa461a5e8f
0fa461a5e8f
0fa461a5e8f
0fd2035e922
0fd2035e922
0fd2035e922
0fd2035e922
10000000000
10000000000
10000000000
10000000000
