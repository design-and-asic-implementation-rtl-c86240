// tb_inv_mix_columns: self-checking testbench for inv_mix_columns.
//
// Applies random states, compared with a GF(2^8) matrix product by (0E 0B 0D 09), and checks that it undoes MixColumn.
// Expected values come from rijndael_ref_pkg, a separate behavioural model.
// Ends with a TB_RESULT line; a watchdog stops a run that hangs.
module tb_inv_mix_columns;
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

  block_t s_in, s_out;
  inv_mix_columns dut (.state_in(s_in), .state_out(s_out));

  initial begin
    ref_init();
    for (int n = 0; n < 100; n++) begin
      block_t v = rand128();
      s_in = ref_mix(v);
      #1 check(s_out, v, "inv_mix_columns round trip");
    end
    for (int n = 0; n < 500; n++) begin
      s_in = rand128();
      #1 check(s_out, ref_inv_mix(s_in), "inv_mix_columns random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
