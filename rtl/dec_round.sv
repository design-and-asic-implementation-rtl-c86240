// dec_round: one round of the modified Rijndael decryption.
//
// state -> modified Inverse ShiftRow (mode_in selects RS1302 or RS2031) ->
// Inverse ByteSub (inverse triple-substitution S-box) -> AddRoundKey ->
// Inverse MixColumn. With FINAL = 1 the Inverse MixColumn step is left out, as
// in the last round, which adds the cipher key itself. Combinational.
module dec_round
  import rijndael_pkg::*;
#(
  parameter bit FINAL = 1'b0  // 1: last round, no Inverse MixColumn
) (
  input  logic   mode_in,
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  block_t after_shift, after_sub, after_ark;

  inv_shift_row u_shift (.mode_in(mode_in), .state_in(state_in), .state_out(after_shift));
  inv_sub_bytes u_sub   (.state_in(after_shift), .state_out(after_sub));
  add_round_key u_ark   (.state_in(after_sub), .round_key(round_key), .state_out(after_ark));

  if (FINAL) begin : g_final
    assign state_out = after_ark;
  end else begin : g_mix
    inv_mix_columns u_mix (.state_in(after_ark), .state_out(state_out));
  end

endmodule
