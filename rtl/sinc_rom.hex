fa2df2
082613
f26b35
28be61
28be61
f26b35
082613
fa2df2
0486ee
faced7
072b82
f46af3
1e1d21
32308d
f24fda
07ecb8
fa6c62
044d4e
fc289d
053cfb
f7c4bf
1334ed
399ec8
f479d8
0666fa
fb9153
0363b1
fdfcf7
02b62e
fbd797
08e8e0
3e5e22
f911fc
03ab2f
fd815b
01e3d2
000000
000000
000000
000000
400000
000000
000000
000000
000000
01e3d2
fd815b
03ab2f
f911fc
3e5e22
08e8e0
fbd797
02b62e
fdfcf7
0363b1
fb9153
0666fa
f479d8
399ec8
1334ed
f7c4bf
053cfb
fc289d
044d4e
fa6c62
07ecb8
f24fda
32308d
1e1d21
f46af3
072b82
faced7
0486ee
fa2df2
082613
f26b35
28be61
28be61
f26b35
082613
fa2df2
