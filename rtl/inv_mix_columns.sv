// inv_mix_columns: Inverse MixColumn on the whole state, one inv_mix_column
// unit per column. Combinational.
module inv_mix_columns
  import rijndael_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    inv_mix_column u_col (
      .col_in (state_in[127 - 32*c -: 32]),
      .col_out(state_out[127 - 32*c -: 32])
    );
  end

endmodule
