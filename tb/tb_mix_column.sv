// tb_mix_column: self-checking testbench for mix_column.
//
// Applies the FIPS-197 example columns and random columns; expected values from a GF(2^8) product by (02 03 01 01).
// Expected values come from rijndael_ref_pkg, a separate behavioural model.
// Ends with a TB_RESULT line; a watchdog stops a run that hangs.
module tb_mix_column;
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

  word_t c_in, c_out;
  mix_column dut (.col_in(c_in), .col_out(c_out));

  initial begin
    ref_init();
    c_in = 32'hdb135345; #1 check(128'(c_out), 128'h8e4da1bc, "db135345");
    c_in = 32'hf20a225c; #1 check(128'(c_out), 128'h9fdc589d, "f20a225c");
    c_in = 32'hc6c6c6c6; #1 check(128'(c_out), 128'hc6c6c6c6, "c6c6c6c6");
    for (int n = 0; n < 1000; n++) begin
      c_in = $urandom;
      #1 check(128'(c_out), 128'(ref_mix({c_in, 96'h0}) >> 96), "random column");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
