// inv_mix_column: Inverse MixColumn on one column of the state.
//
// The column is multiplied modulo x^4+1 by d(x) = 0B x^3 + 0D x^2 + 09 x + 0E,
// the inverse of the MixColumn polynomial:
//   a(r) = 0E*b(r) ^ 0B*b(r+1) ^ 0D*b(r+2) ^ 09*b(r+3)   (indices mod 4).
// Each input byte passes a chain of three xtime units giving 02*b, 04*b and
// 08*b; the four multiples 0E = 8^4^2, 0B = 8^2^1, 0D = 8^4^1 and 09 = 8^1 are
// formed per byte and then XORed across the column. Combinational.
module inv_mix_column
  import rijndael_pkg::*;
(
  input  word_t col_in,
  output word_t col_out
);

  byte_t b [4];
  byte_t b2[4], b4[4], b8[4];
  byte_t m9[4], mb[4], md[4], me[4];

  for (genvar r = 0; r < 4; r++) begin : g_byte
    assign b[r] = col_in[31 - 8*r -: 8];
    xtime u_x2 (.in_byte(b[r]),  .out_byte(b2[r]));
    xtime u_x4 (.in_byte(b2[r]), .out_byte(b4[r]));
    xtime u_x8 (.in_byte(b4[r]), .out_byte(b8[r]));
    assign m9[r] = b8[r] ^ b[r];
    assign mb[r] = b8[r] ^ b2[r] ^ b[r];
    assign md[r] = b8[r] ^ b4[r] ^ b[r];
    assign me[r] = b8[r] ^ b4[r] ^ b2[r];
  end

  for (genvar r = 0; r < 4; r++) begin : g_out
    assign col_out[31 - 8*r -: 8] = me[r] ^ mb[(r+1)%4] ^ md[(r+2)%4] ^ m9[(r+3)%4];
  end

endmodule
