// mix_column: MixColumn on one column of the state.
//
// The column (a0,a1,a2,a3), a0 in bits [31:24], is multiplied modulo x^4+1 by
// c(x) = 03 x^3 + 01 x^2 + 01 x + 02, i.e.
//   b(r) = 02*a(r) ^ 03*a(r+1) ^ a(r+2) ^ a(r+3)   (indices mod 4).
// One xtime unit per input byte gives 02*a(r); 03*a = 02*a ^ a. Combinational.
module mix_column
  import rijndael_pkg::*;
(
  input  word_t col_in,
  output word_t col_out
);

  byte_t a  [4];
  byte_t a2 [4];  // 02 * a(r)

  for (genvar r = 0; r < 4; r++) begin : g_byte
    assign a[r] = col_in[31 - 8*r -: 8];
    xtime u_xtime (.in_byte(a[r]), .out_byte(a2[r]));
    assign col_out[31 - 8*r -: 8] = a2[r] ^ a2[(r+1)%4] ^ a[(r+1)%4] ^ a[(r+2)%4] ^ a[(r+3)%4];
  end

endmodule
