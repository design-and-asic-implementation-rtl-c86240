// rijndael_pkg: types and constants shared by the modified Rijndael cipher.
//
// A 128-bit block is held as a 4x4 byte state a(r,c). Bits [127:120] are
// a(0,0), followed by a(1,0), a(2,0), a(3,0), a(0,1) and so on, so column c
// occupies bits [127-32c -: 32] with row 0 in its top byte (the usual Rijndael
// column order). The cipher uses ten rounds for a 128-bit key, as Rijndael does.
package rijndael_pkg;

  localparam int unsigned NR = 10;  // number of rounds for 128-bit data and key

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Round keys 0..NR; index 0 is the cipher key itself.
  typedef block_t round_keys_t [0:NR];

  // Bit offset of byte a(r,c) inside a block_t (its least significant bit).
  function automatic int unsigned byte_lsb(int unsigned r, int unsigned c);
    return 120 - 8 * (4 * c + r);
  endfunction

  // Cyclic shift of row r in the modified ShiftRow. mode 1 shifts rows 0..3
  // by 1,3,0,2 (LS1302), mode 0 by 2,0,3,1 (LS2031). ShiftRow shifts left,
  // Inverse ShiftRow right, by the same amounts.
  function automatic int unsigned row_offset(logic mode, int unsigned r);
    unique case (r)
      0:       return mode ? 1 : 2;
      1:       return mode ? 3 : 0;
      2:       return mode ? 0 : 3;
      default: return mode ? 2 : 1;
    endcase
  endfunction

endpackage
