01101111
01101100
01101010
01100011
10011111
10110000
10101101
10110011
10110110
10111100
10111010
10110111
10111011
10110011
01110110
01110100
