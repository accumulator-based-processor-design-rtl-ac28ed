// relprime(30): smallest m >= 2 with gcd(m, 30) = 1, stored at data word 0x300.
// One instruction word per line: opcode in [15:10], field in [9:0].
0c00  // 000 ANDIMM 0
141e  // 002 ORIMM 30
4402  // 004 ALLOCATE 2
4c01  // 006 PUSH 1
3008  // 008 JUMPL 8
53ff  // 00a PULL -1
3b00  // 00c STORE 0x300
2c07  // 00e JUMP 7
0c00  // 010 ANDIMM 0
1402  // 012 ORIMM 2
3a00  // 014 STORE 0x200
5001  // 016 PULL 1
3a02  // 018 STORE 0x202
4403  // 01a ALLOCATE 3
5400  // 01c PUSHRA 0
3602  // 01e LOAD 0x202
4c01  // 020 PUSH 1
3600  // 022 LOAD 0x200
4c02  // 024 PUSH 2
3023  // 026 JUMPL 35
5001  // 028 PULL 1
5801  // 02a CMPE 1
3c1b  // 02c BNEZ 27
3600  // 02e LOAD 0x200
0401  // 030 ADDIMM 1
3a00  // 032 STORE 0x200
2c0f  // 034 JUMP 15
5000  // 036 PULL 0
3a08  // 038 STORE 0x208
4803  // 03a DEALLOCATE 3
3600  // 03c LOAD 0x200
4c01  // 03e PUSH 1
4802  // 040 DEALLOCATE 2
3608  // 042 LOAD 0x208
4000  // 044 JUMPACC 0
4401  // 046 ALLOCATE 1
5400  // 048 PUSHRA 0
5002  // 04a PULL 2
3a04  // 04c STORE 0x204
5003  // 04e PULL 3
3a06  // 050 STORE 0x206
3606  // 052 LOAD 0x206
2837  // 054 BEZ 55
3606  // 056 LOAD 0x206
1a04  // 058 SUB 0x204
5c00  // 05a CMPLT 0
3c33  // 05c BNEZ 51
3606  // 05e LOAD 0x206
1a04  // 060 SUB 0x204
3a06  // 062 STORE 0x206
2c29  // 064 JUMP 41
3604  // 066 LOAD 0x204
1a06  // 068 SUB 0x206
3a04  // 06a STORE 0x204
2c29  // 06c JUMP 41
3604  // 06e LOAD 0x204
4c02  // 070 PUSH 2
5000  // 072 PULL 0
4801  // 074 DEALLOCATE 1
4000  // 076 JUMPACC 0
