12121231
31310016
03c9fd40
98571234
02091a04
ffe65d32
091a0470
abcdef10
fff7cac2
