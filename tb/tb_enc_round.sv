// tb_enc_round: self-checking testbench for enc_round.
//
// Drives a full round (FINAL=0) and a final round (FINAL=1) with random states, keys and both modes; expected ByteSub, ShiftRow, MixColumn, AddRoundKey from the reference model.
// Expected values come from rijndael_ref_pkg, a separate behavioural model.
// Ends with a TB_RESULT line; a watchdog stops a run that hangs.
module tb_enc_round;
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
  block_t s_in, k_in, out_full, out_final;
  enc_round #(.FINAL(1'b0)) dut_full  (.mode_in(mode), .state_in(s_in), .round_key(k_in), .state_out(out_full));
  enc_round #(.FINAL(1'b1)) dut_final (.mode_in(mode), .state_in(s_in), .round_key(k_in), .state_out(out_final));

  initial begin
    ref_init();
    for (int n = 0; n < 400; n++) begin
      mode = n[0];
      s_in = rand128();
      k_in = rand128();
      #1 check(out_full, ref_mix(ref_shift(ref_sub(s_in, 0), mode, 0)) ^ k_in, $sformatf("full round, mode %0d", mode));
      check(out_final, ref_shift(ref_sub(s_in, 0), mode, 0) ^ k_in, $sformatf("final round, mode %0d", mode));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
