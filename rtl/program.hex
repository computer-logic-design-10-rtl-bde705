// Demonstration program, one 32-bit instruction word per line.
// Final x30 (LED) value: 55 + 9 = 64.
00000033
03700213
00402823
01002383
00900113
002381b3
00300f33
00000063
