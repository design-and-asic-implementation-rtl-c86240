// inv_shift_row: modified Inverse ShiftRow with two modes.
//
// Each row r is rotated right by row_offset(mode_in, r) bytes, undoing
// shift_row of the same mode: mode_in = 1 is RS1302, mode_in = 0 is RS2031.
// Output byte a'(r,c) = a(r, (c - offset) mod 4). Wiring plus a 2:1
// multiplexer on mode_in. Combinational.
module inv_shift_row
  import rijndael_pkg::*;
(
  input  logic   mode_in,
  input  block_t state_in,
  output block_t state_out
);

  block_t shifted_m1, shifted_m0;

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      assign shifted_m1[byte_lsb(r, c) +: 8] = state_in[byte_lsb(r, (c + 4 - row_offset(1'b1, r)) % 4) +: 8];
      assign shifted_m0[byte_lsb(r, c) +: 8] = state_in[byte_lsb(r, (c + 4 - row_offset(1'b0, r)) % 4) +: 8];
    end
  end

  assign state_out = mode_in ? shifted_m1 : shifted_m0;

endmodule
