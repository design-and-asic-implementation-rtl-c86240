// shift_row: modified ShiftRow with two modes.
//
// Each row r of the state is rotated left by row_offset(mode_in, r) bytes:
// with mode_in = 1 the rows 0..3 move by 1,3,0,2 (LS1302), with mode_in = 0 by
// 2,0,3,1 (LS2031). Neighbouring rows always differ in offset by two or more.
// Output byte a'(r,c) = a(r, (c + offset) mod 4). Both shifts are pure wiring;
// mode_in selects between them with a 2:1 multiplexer. Combinational.
module shift_row
  import rijndael_pkg::*;
(
  input  logic   mode_in,
  input  block_t state_in,
  output block_t state_out
);

  block_t shifted_m1, shifted_m0;

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      assign shifted_m1[byte_lsb(r, c) +: 8] = state_in[byte_lsb(r, (c + row_offset(1'b1, r)) % 4) +: 8];
      assign shifted_m0[byte_lsb(r, c) +: 8] = state_in[byte_lsb(r, (c + row_offset(1'b0, r)) % 4) +: 8];
    end
  end

  assign state_out = mode_in ? shifted_m1 : shifted_m0;

endmodule
