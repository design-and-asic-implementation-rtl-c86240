// tb_inv_mix_column: self-checking testbench for inv_mix_column.
//
// Applies FIPS-197 example columns backwards and random columns; expected values from a GF(2^8) product by (0E 0B 0D 09).
// Expected values come from rijndael_ref_pkg, a separate behavioural model.
// Ends with a TB_RESULT line; a watchdog stops a run that hangs.
module tb_inv_mix_column;
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
  inv_mix_column dut (.col_in(c_in), .col_out(c_out));

  initial begin
    ref_init();
    c_in = 32'h8e4da1bc; #1 check(128'(c_out), 128'hdb135345, "8e4da1bc");
    c_in = 32'h9fdc589d; #1 check(128'(c_out), 128'hf20a225c, "9fdc589d");
    for (int n = 0; n < 1000; n++) begin
      c_in = $urandom;
      #1 check(128'(c_out), 128'(ref_inv_mix({c_in, 96'h0}) >> 96), "random column");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
