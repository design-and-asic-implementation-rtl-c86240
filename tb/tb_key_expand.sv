// tb_key_expand: self-checking testbench for key_expand.
//
// Checks the round keys of the all-zero key against known values and random keys against the reference schedule.
// Expected values come from rijndael_ref_pkg, a separate behavioural model.
// Ends with a TB_RESULT line; a watchdog stops a run that hangs.
module tb_key_expand;
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

  block_t      key;
  round_keys_t rk;
  key_expand dut (.key(key), .round_keys(rk));

  initial begin
    rkeys_t exp_k;
    ref_init();
    key = '0;
    #1 check(rk[1],  128'h0e0f0f0f_0e0f0f0f_0e0f0f0f_0e0f0f0f, "zero key, round key 1");
    check(rk[4],  128'h48978aa4_66bc0479_439f8201_63bb03d3, "zero key, round key 4");
    check(rk[10], 128'h2b650cb3_8f52de04_171d3144_26a36a0e, "zero key, round key 10");
    for (int n = 0; n < 200; n++) begin
      key = (n == 0) ? '0 : rand128();
      exp_k = ref_expand(key);
      #1;
      for (int r = 0; r <= 10; r++) check(rk[r], exp_k[r], $sformatf("key %0d round key %0d", n, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
