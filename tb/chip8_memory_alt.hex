// second test program: two bytes
12
34
