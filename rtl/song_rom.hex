// song 0: C major scale, then a rest
a06
a86
b06
b46
bc6
c46
cc6
d06
006
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
// song 1: twinkle, twinkle
a0c
a0c
bcc
bcc
c4c
c4c
bd8
b4c
b4c
b0c
b0c
a8c
a8c
a18
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
// song 2: ode to joy phrase; entries 26..28 are {43,6},{44,14},{0,28}
b0c
b0c
b4c
bcc
bcc
b4c
b0c
a8c
a0c
a0c
a8c
b0c
b12
a86
a98
b0c
b0c
b4c
bcc
bcc
b4c
b0c
a8c
a0c
a0c
a8c
ac6
b0e
01c
000
000
000
// song 3: arpeggio
a08
b08
bc8
d10
004
d08
bc8
b08
a10
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
000
