800000000000
8058d7d2d5e6
80b1ed4fd99a
810b40a1d814
8164d1f3bc03
81bea1708dde
8218af4373fc
8272fb97b2a6
82cd8698ac2c
83285071e0fc
8383594eefb7
83dea15b9542
843a28c3acde
8495efb3303f
84f1f656379c
854e3cd8f9c9
85aac367cc48
86078a2f2364
8664915b9240
86c1d919caef
871f61969e8d
877d2afefd4e
87db357ff699
88398146b91a
88980e8092db
88f6dd5af156
8955ee03618e
89b540a79025
8a14d575496f
8a74ac9a7989
8ad4c6452c73
8b3522a38e1e
8b95c1e3ea8c
8bf6a434adde
8c57c9c4646f
8cb932c1bae9
8d1adf5b7e5c
8d7ccfc09c51
8ddf042022e7
8e417ca940e3
8ea4398b45cd
8f073af5a201
8f6a8117e6c9
8fce0c21c672
9031dc431467
9095f1abc541
90fa4c8beee5
915eed13c897
91c3d373ab12
9228ffdc10a0
928e727d9532
92f42b88f674
935a2b2f13e7
93c071a0eef9
9426ff0fab1c
948dd3ac8ddb
94f4efa8fef7
955c53368879
95c3fe86d6cc
962bf1cbb8d9
96942d372018
96fcb0fb20ac
97657d49f17b
97ce9255ec43
9837f0518db9
98a1976f7598
990b87e266c2
9975c1dd4752
99e0459320b8
9a4b13371fd1
9ab62afc9500
9b218d16f442
9b8d39b9d54e
9bf93118f3aa
9c6573682ec3
9cd200db8a07
9d3ed9a72d00
9dabfdff6368
9e196e189d47
9e872a276f0c
9ef5326091a1
9f6386f8e28c
9fd228256401
a041161b3d01
a0b0510fb971
a11fd9384a34
a18faeca8545
a1ffd1fc25cf
a27043030c49
a2e102153e92
a3520f68e803
a3c36b345992
a43515ae09e7
a4a70f0c9577
a5195786be9f
a58bef536dbf
a5fed6a9b151
a6720dc0be09
a6e594cfeee8
a7596c0ec560
a7cd93b4e965
a8420bfa298f
a8b6d5167b32
a92bef41fa77
a9a15ab4ea7c
aa1717a7b569
aa8d2652ec90
ab0386ef4887
ab7a39b5a93f
abf13edf1626
ac6896a4be40
ace0413ff83e
ad583eea42a1
add08fdd43d0
ae493452ca36
aec22c84cc5d
af3b78ad690a
afb51906e75c
b02f0dcbb6e0
b0a957366fb8
b123f581d2ac
b19ee8e8c950
b21a31a66619
b295cff5e47e
b311c412a911
b38e0e3841a0
b40aaea2654c
b487a58cf4aa
b504f333f9de
b58297d3a8ba
b60093a85ed6
b67ee6eea3b2
b6fd91e328d1
b77c94c2c9d7
b7fbefca8ca4
b87ba337a174
b8fbaf4762fc
b97c14375684
b9fcd2452c0c
ba7de9aebe60
baff5ab2133e
bb81258d5b70
bc034a7ef2ea
bc85c9c560e8
bd08a39f580c
bd8bd84bb67f
be0f6809860a
be935317fc38
bf1799b67a73
bf9c3c248e25
c0213aa1f0d1
c0a6956e8837
c12c4cca6671
c1b260f5ca10
c238d2311e3d
c2bfa0bcfad9
c346ccda2497
c3ce56c98d22
c4563ecc5335
c4de8523c2c0
c5672a115507
c5f02dd6b0bc
c67990b5aa24
c70352f04337
c78d74c8abba
c817f6814164
c8a2d85c8ffe
c92e1a9d517f
c9b9bd866e2f
ca45c15afcc7
cad2265e4290
cb5eecd3b386
cbec14fef272
cc799f23d115
cd078b86503e
cd95da6a9ff0
ce248c151f85
ceb3a0ca5dc7
cf4318cf1919
cfd2f4683f95
d06333daef2b
d0f3d76c75c6
d184df62516a
d2164c023057
d2a81d91f12b
d33a5457a303
d3ccf099859b
d45ff29e0973
d4f35aabcfee
d5872909ab76
d61b5dfe9f9c
d6aff9d1e13c
d744fccad69d
d7da67311798
d870394c6db3
d9067364d44b
d99d15c278b0
da3420adba4e
dacb946f2aca
db63714f8e29
dbfbb797daf2
dc9467913a4f
dd2d81850832
ddc705bcd379
de60f4825e0f
defb4e1f9d10
df9612deb8f0
e031430a0d9a
e0ccdeec2a95
e168e6cfd329
e2055afffe84
e2a23bc7d7d9
e33f8972be8a
e3dd444c464a
e47b6ca0373e
e51a02ba8e27
e5b906e77c83
e658797368b4
e6f85aaaee20
e798aadadd5c
e8396a503c4c
e8da9958464b
e97c38406c50
ea1e4756550f
eac0c6e7dd24
eb63b7431737
ec0718b64c1d
ecaaeb8ffb04
ed4f301ed994
edf3e6b1d419
ee990f980da3
ef3eab20e033
efe4b99bdcdb
f08b3b58cbe9
f13230a7ad09
f1d999d8b771
f281773c5a00
f329c9233b6c
f3d28fde3a64
f47bcbbe6dba
f5257d152487
f5cfa433e653
f67a416c7340
f7255510c429
f7d0df730ad1
f87ce0e5b209
f92959bb5dd5
f9d64a46eb94
fa83b2db722a
fb3193cc4228
fbdfed6ce5f1
fc8ec01121e4
fd3e0c0cf487
fdedd1b496a9
fe9e115c7b90
ff4ecb59511f
