// Test pattern for the instruction ROM file-loading path.
00003039
9E37A9EA
3C6F239B
DAA69D4C
78DE16FD
171590AE
B54D0A5F
53848410
F1BBFDC1
8FF37772
2E2AF123
CC626AD4
6A99E485
08D15E36
A708D7E7
45405198
