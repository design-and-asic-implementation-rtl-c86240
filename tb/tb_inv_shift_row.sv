// tb_inv_shift_row: self-checking testbench for inv_shift_row.
//
// Checks the byte positions drawn for both modes on a state whose bytes hold their own index, then random states in both modes and the round trip after ShiftRow.
// Expected values come from rijndael_ref_pkg, a separate behavioural model.
// Ends with a TB_RESULT line; a watchdog stops a run that hangs.
module tb_inv_shift_row;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic   mode;
  block_t s_in, s_out;
  inv_shift_row dut (.mode_in(mode), .state_in(s_in), .state_out(s_out));

  // state whose byte a(r,c) holds the value 0x<r><c>
  function automatic block_t index_state();
    block_t v;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) v[120 - 8*(4*c + r) +: 8] = byte_t'(16*r + c);
    return v;
  endfunction

  initial begin
    ref_init();
    // RS1302 applied to the LS1302 arrangement restores a(r,c)
    mode = 1'b1;
    s_in = {8'h01, 8'h13, 8'h20, 8'h32,  8'h02, 8'h10, 8'h21, 8'h33,
            8'h03, 8'h11, 8'h22, 8'h30,  8'h00, 8'h12, 8'h23, 8'h31};
    #1 check(s_out, index_state(), "RS1302 positions");
    mode = 1'b0;
    s_in = {8'h02, 8'h10, 8'h23, 8'h31,  8'h03, 8'h11, 8'h20, 8'h32,
            8'h00, 8'h12, 8'h21, 8'h33,  8'h01, 8'h13, 8'h22, 8'h30};
    #1 check(s_out, index_state(), "RS2031 positions");
    for (int n = 0; n < 400; n++) begin
      mode = n[0];
      s_in = rand128();
      #1 check(s_out, ref_shift(s_in, mode, 1), $sformatf("random mode %0d", mode));
      s_in = ref_shift(s_out, mode, 0);
      #1 check(s_out, ref_shift(s_in, mode, 1), "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
