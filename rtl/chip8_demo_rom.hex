// demo program, loaded at 0x200: two bytes per line
00 E0  // 200: CLS
6A 05  // 202: VA = 5            (x of first digit)
6B 03  // 204: VB = 3            (y)
C0 FF  // 206: V0 = random
A3 00  // 208: I = 0x300
F0 33  // 20A: BCD of V0 at I
F2 65  // 20C: V0..V2 = digits
F0 29  // 20E: I = font digit V0
DA B5  // 210: draw digit at (VA, VB)
7A 06  // 212: VA += 6
F1 29  // 214: I = font digit V1
DA B5  // 216: draw
7A 06  // 218: VA += 6
F2 29  // 21A: I = font digit V2
DA B5  // 21C: draw
22 40  // 21E: call 0x240
63 04  // 220: V3 = 4
F3 18  // 222: sound timer = V3
64 00  // 224: V4 = 0
E4 9E  // 226: skip next if key V4 is down
12 2C  // 228: jump 0x22C
00 E0  // 22A: CLS (key 0 held)
65 3C  // 22C: V5 = 60
F5 15  // 22E: delay timer = V5
F6 07  // 230: V6 = delay timer
36 00  // 232: skip next if V6 == 0
12 30  // 234: jump 0x230       (wait one second)
12 00  // 236: jump 0x200       (start over)
00 00  // 238: unused
00 00  // 23A: unused
00 00  // 23C: unused
00 00  // 23E: unused
6C 3C  // 240: VC = 60           (subroutine: corner sprite)
6D 1E  // 242: VD = 30
A2 50  // 244: I = 0x250
DC D4  // 246: draw 4 rows at (60, 30), clipped
DC D4  // 248: draw again: erases it, collision
8E F0  // 24A: VE = VF            (collision flag)
00 EE  // 24C: return
00 00  // 24E: unused
FF 81  // 250: sprite rows 1-2
81 FF  // 252: sprite rows 3-4
