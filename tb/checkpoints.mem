0000 0000 0000 0000 0068 // after instr 0
0001 0000 0000 fffb 0068 // after instr 1
0002 0000 0000 fffb 0036 // after instr 2
0003 0071 0000 fffb 0036 // after instr 3
0004 0071 000e fffb 0036 // after instr 4
0005 0071 000e fffa 0036 // after instr 5
0006 0071 000e ffdf 0036 // after instr 6
0007 0071 000e fffa 0036 // after instr 7
0008 0049 000e fffa 0036 // after instr 8
0009 0049 000e fffa ffd8 // after instr 9
000a 0049 ffeb fffa ffd8 // after instr 10
000b 0049 ffeb fffa 0023 // after instr 11
000c 0049 ffeb fffa 001a // after instr 12
000d 0049 ffeb fffa 0086 // after instr 13
000e 0049 ffdc fffa 0086 // after instr 14
000f 00a1 ffdc fffa 0086 // after instr 15
0010 00a1 ffdc 0020 0086 // after instr 16
0011 00a1 ffdc 0020 002b // after instr 17
0012 00a1 ff5d 0020 002b // after instr 18
0013 00a1 ff90 0020 002b // after instr 19
0014 00a1 ff90 0020 002b // after instr 20
0015 00a1 0014 0020 002b // after instr 21
0016 00a1 0014 0020 002b // after instr 22
0017 00a1 0014 0020 002b // after instr 23
0018 006f 0014 0020 002b // after instr 24
0019 006f 0014 0020 002b // after instr 25
001a 006f 0014 0020 002b // after instr 26
001b 006f 0014 0020 002b // after instr 27
001c 006f 0014 0006 002b // after instr 28
001d 006f 003f 0006 002b // after instr 29
001e ffc0 003f 0006 002b // after instr 30
001f ffc0 003f 0006 002b // after instr 31
0020 0078 003f 0006 002b // after instr 32
0021 0078 003f ffb3 002b // after instr 33
0022 0078 003f ffb3 004e // after instr 34
0023 0078 003f ffb3 003b // after instr 35
0024 0078 003f ffb3 ffbf // after instr 36
0025 0078 003f ffb3 ffa0 // after instr 37
0026 007b 003f ffb3 ffa0 // after instr 38
0027 007b 003f ffb3 ffa0 // after instr 39
0028 0075 003f ffb3 ffa0 // after instr 40
0029 0075 003f ffb3 ffec // after instr 41
002a 0075 003f ffb3 ffec // after instr 42
002b 0075 ffd8 ffb3 ffec // after instr 43
002c 009a ffd8 ffb3 ffec // after instr 44
002d 00bb ffd8 ffb3 ffec // after instr 45
002e 00bb ffd8 ffb3 ffec // after instr 46
002f 00bb ffd8 ffb3 fffa // after instr 47
0030 00bb ffd8 ffb3 fffa // after instr 48
0031 00bb 0001 ffb3 fffa // after instr 49
0032 00bb 0060 ffb3 fffa // after instr 50
0033 00bb 0038 ffb3 fffa // after instr 51
0034 00bb 0038 ffb3 fffa // after instr 52
0035 00bb 0038 ffb3 ffa8 // after instr 53
0036 00bb ffa6 ffb3 ffa8 // after instr 54
0037 00bb ffa6 ffb3 ffbd // after instr 55
0038 00bb ffa6 ffb3 ffbd // after instr 56
0039 00bb ffa6 ffb3 001d // after instr 57
003a 00bb ffa6 ffb3 ff93 // after instr 58
003b 00bb ffa6 ffa3 ff93 // after instr 59
003c 00bb ffa6 0028 ff93 // after instr 60
003d 00bb ffa6 0028 ff93 // after instr 61
003e 00bb ffa6 0028 ff93 // after instr 62
003f 00b8 ffa6 0028 ff93 // after instr 63
0040 00b6 ffa6 0028 ff93 // after instr 64
0041 00b6 fff6 0028 ff93 // after instr 65
0042 00b6 fff6 006c ff93 // after instr 66
0043 00b6 ff94 006c ff93 // after instr 67
0044 00b6 ff94 006c ff93 // after instr 68
0045 00b6 ff4b 006c ff93 // after instr 69
0046 00b6 ffb8 006c ff93 // after instr 70
0047 00b6 ffb8 006c ff91 // after instr 71
0048 00b6 0067 006c ff91 // after instr 72
0049 00b6 ffb2 006c ff91 // after instr 73
004a 00af ffb2 006c ff91 // after instr 74
004b 0036 ffb2 006c ff91 // after instr 75
004c 0036 0011 006c ff91 // after instr 76
004d 0036 0011 006c ff91 // after instr 77
004e 0036 0011 006c ff91 // after instr 78
004f 0036 0011 006c ff91 // after instr 79
0050 0036 0011 006c ff91 // after instr 80
0051 0036 0011 ff90 ff91 // after instr 81
0052 0036 0011 ffb2 ff91 // after instr 82
0053 0036 0011 ff9e ff91 // after instr 83
0054 007a 0011 ff9e ff91 // after instr 84
0055 0001 0011 ff9e ff91 // after instr 85
0056 0001 0011 ff9e ff91 // after instr 86
0057 0001 0011 ffb3 ff91 // after instr 87
0058 0001 0011 ffc6 ff91 // after instr 88
0059 0001 0011 ffc6 ff91 // after instr 89
005a 0001 0011 ffe3 ff91 // after instr 90
005b 0001 0011 0043 ff91 // after instr 91
005c 0001 0011 0043 ffc0 // after instr 92
005d 0001 0011 0043 ffc0 // after instr 93
005e ff98 0011 0043 ffc0 // after instr 94
005f 0079 0011 0043 ffc0 // after instr 95
0060 0079 005c 0043 ffc0 // after instr 96
0061 0079 005c 0043 fff8 // after instr 97
0062 0079 005c 0043 005b // after instr 98
0063 0079 005c 0043 005b // after instr 99
