// Full data-RAM test (8051 encoding): writes (a xor 55h) to every RAM word
// a = 00h..7Fh with MOV A,#d / MOV a,A, then reads each back, XORs it with
// the pattern and writes the result to P1 (00h when the word is good).
// Ends with XRL A,7Fh -> P2, MOV B,A / MUL AB -> P0, A5h -> P1, LJMP self.
74 55 F5 00 74 54 F5 01 74 57 F5 02 74 56 F5 03
74 51 F5 04 74 50 F5 05 74 53 F5 06 74 52 F5 07
74 5D F5 08 74 5C F5 09 74 5F F5 0A 74 5E F5 0B
74 59 F5 0C 74 58 F5 0D 74 5B F5 0E 74 5A F5 0F
74 45 F5 10 74 44 F5 11 74 47 F5 12 74 46 F5 13
74 41 F5 14 74 40 F5 15 74 43 F5 16 74 42 F5 17
74 4D F5 18 74 4C F5 19 74 4F F5 1A 74 4E F5 1B
74 49 F5 1C 74 48 F5 1D 74 4B F5 1E 74 4A F5 1F
74 75 F5 20 74 74 F5 21 74 77 F5 22 74 76 F5 23
74 71 F5 24 74 70 F5 25 74 73 F5 26 74 72 F5 27
74 7D F5 28 74 7C F5 29 74 7F F5 2A 74 7E F5 2B
74 79 F5 2C 74 78 F5 2D 74 7B F5 2E 74 7A F5 2F
74 65 F5 30 74 64 F5 31 74 67 F5 32 74 66 F5 33
74 61 F5 34 74 60 F5 35 74 63 F5 36 74 62 F5 37
74 6D F5 38 74 6C F5 39 74 6F F5 3A 74 6E F5 3B
74 69 F5 3C 74 68 F5 3D 74 6B F5 3E 74 6A F5 3F
74 15 F5 40 74 14 F5 41 74 17 F5 42 74 16 F5 43
74 11 F5 44 74 10 F5 45 74 13 F5 46 74 12 F5 47
74 1D F5 48 74 1C F5 49 74 1F F5 4A 74 1E F5 4B
74 19 F5 4C 74 18 F5 4D 74 1B F5 4E 74 1A F5 4F
74 05 F5 50 74 04 F5 51 74 07 F5 52 74 06 F5 53
74 01 F5 54 74 00 F5 55 74 03 F5 56 74 02 F5 57
74 0D F5 58 74 0C F5 59 74 0F F5 5A 74 0E F5 5B
74 09 F5 5C 74 08 F5 5D 74 0B F5 5E 74 0A F5 5F
74 35 F5 60 74 34 F5 61 74 37 F5 62 74 36 F5 63
74 31 F5 64 74 30 F5 65 74 33 F5 66 74 32 F5 67
74 3D F5 68 74 3C F5 69 74 3F F5 6A 74 3E F5 6B
74 39 F5 6C 74 38 F5 6D 74 3B F5 6E 74 3A F5 6F
74 25 F5 70 74 24 F5 71 74 27 F5 72 74 26 F5 73
74 21 F5 74 74 20 F5 75 74 23 F5 76 74 22 F5 77
74 2D F5 78 74 2C F5 79 74 2F F5 7A 74 2E F5 7B
74 29 F5 7C 74 28 F5 7D 74 2B F5 7E 74 2A F5 7F
E5 00 64 55 F5 90 E5 01 64 54 F5 90 E5 02 64 57
F5 90 E5 03 64 56 F5 90 E5 04 64 51 F5 90 E5 05
64 50 F5 90 E5 06 64 53 F5 90 E5 07 64 52 F5 90
E5 08 64 5D F5 90 E5 09 64 5C F5 90 E5 0A 64 5F
F5 90 E5 0B 64 5E F5 90 E5 0C 64 59 F5 90 E5 0D
64 58 F5 90 E5 0E 64 5B F5 90 E5 0F 64 5A F5 90
E5 10 64 45 F5 90 E5 11 64 44 F5 90 E5 12 64 47
F5 90 E5 13 64 46 F5 90 E5 14 64 41 F5 90 E5 15
64 40 F5 90 E5 16 64 43 F5 90 E5 17 64 42 F5 90
E5 18 64 4D F5 90 E5 19 64 4C F5 90 E5 1A 64 4F
F5 90 E5 1B 64 4E F5 90 E5 1C 64 49 F5 90 E5 1D
64 48 F5 90 E5 1E 64 4B F5 90 E5 1F 64 4A F5 90
E5 20 64 75 F5 90 E5 21 64 74 F5 90 E5 22 64 77
F5 90 E5 23 64 76 F5 90 E5 24 64 71 F5 90 E5 25
64 70 F5 90 E5 26 64 73 F5 90 E5 27 64 72 F5 90
E5 28 64 7D F5 90 E5 29 64 7C F5 90 E5 2A 64 7F
F5 90 E5 2B 64 7E F5 90 E5 2C 64 79 F5 90 E5 2D
64 78 F5 90 E5 2E 64 7B F5 90 E5 2F 64 7A F5 90
E5 30 64 65 F5 90 E5 31 64 64 F5 90 E5 32 64 67
F5 90 E5 33 64 66 F5 90 E5 34 64 61 F5 90 E5 35
64 60 F5 90 E5 36 64 63 F5 90 E5 37 64 62 F5 90
E5 38 64 6D F5 90 E5 39 64 6C F5 90 E5 3A 64 6F
F5 90 E5 3B 64 6E F5 90 E5 3C 64 69 F5 90 E5 3D
64 68 F5 90 E5 3E 64 6B F5 90 E5 3F 64 6A F5 90
E5 40 64 15 F5 90 E5 41 64 14 F5 90 E5 42 64 17
F5 90 E5 43 64 16 F5 90 E5 44 64 11 F5 90 E5 45
64 10 F5 90 E5 46 64 13 F5 90 E5 47 64 12 F5 90
E5 48 64 1D F5 90 E5 49 64 1C F5 90 E5 4A 64 1F
F5 90 E5 4B 64 1E F5 90 E5 4C 64 19 F5 90 E5 4D
64 18 F5 90 E5 4E 64 1B F5 90 E5 4F 64 1A F5 90
E5 50 64 05 F5 90 E5 51 64 04 F5 90 E5 52 64 07
F5 90 E5 53 64 06 F5 90 E5 54 64 01 F5 90 E5 55
64 00 F5 90 E5 56 64 03 F5 90 E5 57 64 02 F5 90
E5 58 64 0D F5 90 E5 59 64 0C F5 90 E5 5A 64 0F
F5 90 E5 5B 64 0E F5 90 E5 5C 64 09 F5 90 E5 5D
64 08 F5 90 E5 5E 64 0B F5 90 E5 5F 64 0A F5 90
E5 60 64 35 F5 90 E5 61 64 34 F5 90 E5 62 64 37
F5 90 E5 63 64 36 F5 90 E5 64 64 31 F5 90 E5 65
64 30 F5 90 E5 66 64 33 F5 90 E5 67 64 32 F5 90
E5 68 64 3D F5 90 E5 69 64 3C F5 90 E5 6A 64 3F
F5 90 E5 6B 64 3E F5 90 E5 6C 64 39 F5 90 E5 6D
64 38 F5 90 E5 6E 64 3B F5 90 E5 6F 64 3A F5 90
E5 70 64 25 F5 90 E5 71 64 24 F5 90 E5 72 64 27
F5 90 E5 73 64 26 F5 90 E5 74 64 21 F5 90 E5 75
64 20 F5 90 E5 76 64 23 F5 90 E5 77 64 22 F5 90
E5 78 64 2D F5 90 E5 79 64 2C F5 90 E5 7A 64 2F
F5 90 E5 7B 64 2E F5 90 E5 7C 64 29 F5 90 E5 7D
64 28 F5 90 E5 7E 64 2B F5 90 E5 7F 64 2A F5 90
74 00 65 7F F5 A0 F5 F0 74 03 A4 F5 80 74 A5 F5
90 02 05 11
