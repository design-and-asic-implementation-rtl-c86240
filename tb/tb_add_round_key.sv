// tb_add_round_key: self-checking testbench for add_round_key.
//
// Applies random states and keys and compares with their XOR.
// Expected values come from rijndael_ref_pkg, a separate behavioural model.
// Ends with a TB_RESULT line; a watchdog stops a run that hangs.
module tb_add_round_key;
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

  block_t s_in, k_in, s_out;
  add_round_key dut (.state_in(s_in), .round_key(k_in), .state_out(s_out));

  initial begin
    ref_init();
    for (int n = 0; n < 500; n++) begin
      s_in = rand128();
      k_in = rand128();
      #1 check(s_out, s_in ^ k_in, "add_round_key");
      check(s_out ^ k_in, s_in, "add_round_key twice");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
