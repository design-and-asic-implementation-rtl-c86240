// sub_bytes: modified ByteSub. Every one of the 16 state bytes is replaced by
// its entry in the triple-substitution S-box; sixteen s3_sbox look-ups work in
// parallel. Combinational.
module sub_bytes
  import rijndael_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    s3_sbox u_sbox (
      .in_byte (state_in[8*i +: 8]),
      .out_byte(state_out[8*i +: 8])
    );
  end

endmodule
