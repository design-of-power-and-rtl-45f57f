0000 0001 0004 0009 0020 0029 0034 0041 0080 0089 0094 00a1 00a0 00b1 00c4 00d9
0100 0121 0124 0149 01e0 01f9 0214 0231 0380 03a9 03b4 0411 03e0 0401 0424 0479
0400 0481 04c4 0509 0520 05a9 05f4 0641 0680 06c9 06d4 0721 07a0 07f1 0804 0859
0900 09a1 09e4 0a29 0ae0 0b39 0ad4 0b51 0d80 0de9 0df4 0e51 0de0 0e41 0ee4 0f39
1000 1081 1204 1289 1220 12a9 1434 14c1 1480 1489 1694 16a1 16a0 16f1 18c4 1919
1900 19a1 1b24 1bc9 1be0 1c39 1d94 1df1 1f80 1fa9 1fb4 2011 21e0 2281 2224 22f9
2400 2501 2644 2709 2720 2829 2874 2941 2a80 2b09 2c54 2d21 2da0 2e31 2e84 2f59
3100 3221 3364 3429 34e0 35b9 35d4 36d1 3980 3a29 39f4 3ad1 3be0 3cc1 3d64 3df9
4000 4181 4204 4389 4420 45a9 4634 47c1 4880 4a09 4a94 4c21 4ca0 4e31 4ec4 5059
5100 52a1 5324 54c9 55e0 56f9 5814 5931 5b80 5ba9 5db4 5e11 5fe0 6001 6224 6279
6400 6601 66c4 6809 6920 6a29 6bf4 6c41 6e80 7049 70d4 7221 73a0 7471 7604 7659
7900 7b21 7be4 7d29 7ee0 7f39 80d4 8251 8580 85e9 87f4 8851 89e0 8b41 8ce4 8db9
9000 9201 9404 9489 9620 9829 9a34 9ac1 9c80 9e09 a094 a0a1 a2a0 a471 a6c4 a719
a900 ab21 ad24 adc9 afe0 b139 b394 b471 b780 b7a9 b9b4 bb11 bde0 be81 c024 c1f9
c400 c681 c844 c989 cb20 cca9 ce74 d0c1 d280 d489 d654 d7a1 d9a0 dab1 dc84 ded9
e100 e3a1 e564 e6a9 e8e0 e9b9 ebd4 edd1 f180 f229 f3f4 f5d1 f7e0 f9c1 fb64 fbf9
