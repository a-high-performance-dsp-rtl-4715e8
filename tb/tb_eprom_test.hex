1234
abcd
0020
ffff
8000
