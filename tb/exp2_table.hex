8000
8059
80b2
810b
8165
81bf
8219
8273
82ce
8328
8383
83df
843a
8496
84f2
854e
85ab
8608
8665
86c2
871f
877d
87db
883a
8898
88f7
8956
89b5
8a15
8a75
8ad5
8b35
8b96
8bf7
8c58
8cb9
8d1b
8d7d
8ddf
8e41
8ea4
8f07
8f6b
8fce
9032
9096
90fa
915f
91c4
9229
928e
92f4
935a
93c0
9427
948e
94f5
955c
95c4
962c
9694
96fd
9765
97cf
9838
98a2
990c
9976
99e0
9a4b
9ab6
9b22
9b8d
9bf9
9c65
9cd2
9d3f
9dac
9e19
9e87
9ef5
9f64
9fd2
a041
a0b0
a120
a190
a200
a270
a2e1
a352
a3c3
a435
a4a7
a519
a58c
a5ff
a672
a6e6
a759
a7ce
a842
a8b7
a92c
a9a1
aa17
aa8d
ab04
ab7a
abf1
ac69
ace0
ad58
add1
ae49
aec2
af3b
afb5
b02f
b0a9
b124
b19f
b21a
b296
b312
b38e
b40b
b488
b505
b583
b601
b67f
b6fe
b77d
b7fc
b87c
b8fc
b97c
b9fd
ba7e
baff
bb81
bc03
bc86
bd09
bd8c
be0f
be93
bf18
bf9c
c021
c0a7
c12c
c1b2
c239
c2c0
c347
c3ce
c456
c4df
c567
c5f0
c67a
c703
c78d
c818
c8a3
c92e
c9ba
ca46
cad2
cb5f
cbec
cc7a
cd08
cd96
ce25
ceb4
cf43
cfd3
d063
d0f4
d185
d216
d2a8
d33a
d3cd
d460
d4f3
d587
d61b
d6b0
d745
d7da
d870
d906
d99d
da34
dacc
db63
dbfc
dc94
dd2e
ddc7
de61
defb
df96
e031
e0cd
e169
e205
e2a2
e340
e3dd
e47b
e51a
e5b9
e658
e6f8
e799
e839
e8db
e97c
ea1e
eac1
eb64
ec07
ecab
ed4f
edf4
ee99
ef3f
efe5
f08b
f132
f1da
f281
f32a
f3d3
f47c
f525
f5d0
f67a
f725
f7d1
f87d
f929
f9d6
fa84
fb32
fbe0
fc8f
fd3e
fdee
fe9e
ff4f
