// enc_round: one round of the modified Rijndael encryption.
//
// state -> modified ByteSub (triple-substitution S-box) -> modified ShiftRow
// (mode_in selects LS1302 or LS2031) -> MixColumn -> AddRoundKey.
// With FINAL = 1 the MixColumn step is left out, as in the last of the ten
// rounds. Combinational.
module enc_round
  import rijndael_pkg::*;
#(
  parameter bit FINAL = 1'b0  // 1: last round, no MixColumn
) (
  input  logic   mode_in,
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  block_t after_sub, after_shift, after_mix;

  sub_bytes u_sub   (.state_in(state_in),  .state_out(after_sub));
  shift_row u_shift (.mode_in(mode_in), .state_in(after_sub), .state_out(after_shift));

  if (FINAL) begin : g_final
    assign after_mix = after_shift;
  end else begin : g_mix
    mix_columns u_mix (.state_in(after_shift), .state_out(after_mix));
  end

  add_round_key u_ark (.state_in(after_mix), .round_key(round_key), .state_out(state_out));

endmodule
