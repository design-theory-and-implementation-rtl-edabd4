// Example application program: a short data-RAM test (8051 encoding).
// Writes 5Ah,5Bh,5Ch to RAM 30h..32h, reads them back and XORs with the
// expected values (P1 <- 00h per passing word), exercises a direct XRL, a
// port read, MUL AB and the ports, writes A5h to P1 as a done mark and
// loops on an LJMP to itself.
74 5A     // 0000  MOV A,#5Ah
F5 30     // 0002  MOV 30h,A
04        // 0004  INC A
F5 31     // 0005  MOV 31h,A
04        // 0007  INC A
F5 32     // 0008  MOV 32h,A
E5 30     // 000A  MOV A,30h
64 5A     // 000C  XRL A,#5Ah
F5 90     // 000E  MOV P1,A
E5 31     // 0010  MOV A,31h
64 5B     // 0012  XRL A,#5Bh
F5 90     // 0014  MOV P1,A
E5 32     // 0016  MOV A,32h
65 31     // 0018  XRL A,31h
F5 A0     // 001A  MOV P2,A
E5 B0     // 001C  MOV A,P3
F5 F0     // 001E  MOV B,A
74 0A     // 0020  MOV A,#0Ah
A4        // 0022  MUL AB
F5 80     // 0023  MOV P0,A
E5 F0     // 0025  MOV A,B
04        // 0027  INC A
F5 33     // 0028  MOV 33h,A
E5 33     // 002A  MOV A,33h
64 01     // 002C  XRL A,#01h
F5 B0     // 002E  MOV P3,A
74 A5     // 0030  MOV A,#0A5h
F5 90     // 0032  MOV P1,A
02 00 34  // 0034  LJMP 0034h
