// tb_s3_isbox: self-checking testbench for s3_isbox.
//
// Applies all 256 bytes, compares with the inverse of the triple-substitution S-box and checks the round trip through the reference forward S-box.
// Expected values come from rijndael_ref_pkg, a separate behavioural model.
// Ends with a TB_RESULT line; a watchdog stops a run that hangs.
module tb_s3_isbox;
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

  byte_t in_b, out_b;
  s3_isbox dut (.in_byte(in_b), .out_byte(out_b));

  initial begin
    ref_init();
    for (int x = 0; x < 256; x++) begin
      in_b = byte_t'(x);
      #1 check(128'(out_b), 128'(is3_tab[x]), $sformatf("s3_isbox(%02h)", x));
      check(128'(s3_tab[out_b]), 128'(x), $sformatf("S3(s3_isbox(%02h))", x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
