// tb_mix_columns: self-checking testbench for mix_columns.
//
// Applies the FIPS-197 MixColumns example column and random states, compared with a GF(2^8) matrix product by (02 03 01 01).
// Expected values come from rijndael_ref_pkg, a separate behavioural model.
// Ends with a TB_RESULT line; a watchdog stops a run that hangs.
module tb_mix_columns;
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
  mix_columns dut (.state_in(s_in), .state_out(s_out));

  initial begin
    ref_init();
    s_in = {32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hd4d4d4d5};
    #1 check(s_out, {32'h8e4da1bc, 32'h9fdc589d, 32'h01010101, 32'hd5d5d7d6}, "mix_columns known columns");
    for (int n = 0; n < 500; n++) begin
      s_in = rand128();
      #1 check(s_out, ref_mix(s_in), "mix_columns random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
