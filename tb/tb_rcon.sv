// tb_rcon: self-checking testbench for rcon.
//
// Applies round numbers 0..15 and compares with 02^(i-1) in GF(2^8) for 1..10 and 00 otherwise.
// Expected values come from rijndael_ref_pkg, a separate behavioural model.
// Ends with a TB_RESULT line; a watchdog stops a run that hangs.
module tb_rcon;
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

  logic [3:0] rnd;
  byte_t      rc;
  rcon dut (.round(rnd), .rcon_out(rc));

  initial begin
    byte_t p = 8'h01;
    ref_init();
    for (int i = 0; i < 16; i++) begin
      rnd = 4'(i);
      #1 check(128'(rc), (i >= 1 && i <= 10) ? 128'(p) : 128'h0, $sformatf("rcon(%0d)", i));
      if (i >= 1) p = gmul(p, 8'h02);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
