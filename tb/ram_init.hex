// initial words for the RAM testbench
12345678
cafef00d
00c0ffee
a5a55a5a
