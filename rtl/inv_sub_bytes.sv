// inv_sub_bytes: Inverse ByteSub. Every one of the 16 state bytes goes through
// the inverse triple-substitution S-box; sixteen s3_isbox look-ups in
// parallel. Combinational.
module inv_sub_bytes
  import rijndael_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    s3_isbox u_isbox (
      .in_byte (state_in[8*i +: 8]),
      .out_byte(state_out[8*i +: 8])
    );
  end

endmodule
