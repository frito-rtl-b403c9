// second test program: draw the font letter A at (0,0), then loop forever
6A 0A   // 200: VA = 0x0A
FA 29   // 202: I = font digit VA
D0 05   // 204: draw 5 rows at (V0, V0) = (0, 0)
12 06   // 206: jump to 206
