// Reliability template: 16 signed 16-bit words, two's complement hex.
// volt (mV): green_lo green_hi blue_lo blue_hi
03FC
0528
03D4
03FB
// temp (0.1 degC): green_lo green_hi blue_lo blue_hi
0002
0384
0385
04E1
// nMOS (0.1 sigma): green_lo green_hi blue_lo blue_hi
FFEC
0000
FFE2
FFEB
// pMOS (0.1 sigma): green_lo green_hi blue_lo blue_hi
0000
0014
0015
001E
