000
020
040
060
080
0a0
0c0
0df
0ff
11e
13c
15b
179
197
1b4
1d1
1ed
209
225
240
25a
274
28d
2a5
2bd
2d4
2ea
300
315
329
33c
34f
361
371
381
390
39f
3ac
3b8
3c3
3ce
3d7
3e0
3e7
3ee
3f3
3f8
3fb
3fe
3ff
400
3ff
3fe
3fb
3f8
3f3
3ee
3e7
3e0
3d7
3ce
3c3
3b8
3ac
39f
390
381
371
361
34f
33c
329
315
300
2ea
2d4
2bd
2a5
28d
274
25a
240
225
209
1ed
1d1
1b4
197
179
15b
13c
11e
0ff
0df
0c0
0a0
080
060
040
020
000
fe0
fc0
fa0
f80
f60
f40
f21
f01
ee2
ec4
ea5
e87
e69
e4c
e2f
e13
df7
ddb
dc0
da6
d8c
d73
d5b
d43
d2c
d16
d00
ceb
cd7
cc4
cb1
c9f
c8f
c7f
c70
c61
c54
c48
c3d
c32
c29
c20
c19
c12
c0d
c08
c05
c02
c01
c00
c01
c02
c05
c08
c0d
c12
c19
c20
c29
c32
c3d
c48
c54
c61
c70
c7f
c8f
c9f
cb1
cc4
cd7
ceb
d00
d16
d2c
d43
d5b
d73
d8c
da6
dc0
ddb
df7
e13
e2f
e4c
e69
e87
ea5
ec4
ee2
f01
f21
f40
f60
f80
fa0
fc0
fe0
