// xtime: multiplication of a byte by 02 in GF(2^8).
//
// The byte is shifted left by one with a 0 entering bit 0; if the bit shifted
// out (b7) was set, the result is reduced by XOR with 1B (00011011).
// Combinational: in_byte (8 bits) -> out_byte (8 bits).
module xtime
  import rijndael_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  byte_t shifted;

  assign shifted  = {in_byte[6:0], 1'b0};
  assign out_byte = in_byte[7] ? (shifted ^ 8'h1B) : shifted;

endmodule
