// tb_rijndael_top: end-to-end testbench of rijndael_top at its default (and
// only) configuration.
//
// Two parties share the chip: the encryption core turns a random stream of
// plaintexts into ciphertexts while, in the same cycles, the decryption core
// decrypts ciphertexts produced earlier by the encryption core (round trip
// back to the original plaintext) mixed with unrelated random ciphertexts.
// Every output is compared with the behavioural reference model, and the
// outputs are checked two rising edges after each load, as in the core tests.
// The run counts each mechanism of the design and fails if one never
// happened: ShiftRow mode 1 and mode 0 blocks, a mode switch between
// sessions, loads in consecutive cycles, idle cycles with held outputs,
// cycles in which both cores finish together, completed round trips and an
// asynchronous reset with data in flight.
module tb_rijndael_top;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  logic   clk = 1'b0;
  logic   rst, load, mode_in;
  block_t pt_in, enc_key, ct_out, ct_in, dec_key, pt_out;
  logic   enc_done, dec_done;

  rijndael_top dut (
    .clk(clk), .rst(rst), .load(load), .mode_in(mode_in),
    .plain_text_in(pt_in), .enc_key(enc_key), .cipher_text_out(ct_out), .enc_done(enc_done),
    .cipher_text_in(ct_in), .dec_key(dec_key), .plain_text_out(pt_out), .dec_done(dec_done)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL cycle %0d %s: got %h expected %h", cycle, what, got, exp);
    end
  endtask

  // mechanism counters
  int n_mode1, n_mode0, n_switch, n_b2b, n_idle_hold, n_both_done, n_roundtrip, n_reset;

  // pipeline model of both cores
  logic   ev1, ev2, dv1, dv2;
  block_t ee1, ee2, de1, de2;
  logic   rt1, rt2;          // the decryption in flight is a round trip
  block_t rt_pt1, rt_pt2;    // plaintext it must give back
  logic   last_load, last_mode;

  // ciphertexts the encryption core produced, waiting to be decrypted
  typedef struct {
    block_t ct;
    block_t pt;
    block_t key;
    logic   mode;
  } msg_t;
  msg_t sent [$];
  msg_t inflight1, inflight2;

  task automatic model_reset();
    ev1 = 0; ev2 = 0; dv1 = 0; dv2 = 0;
    ee1 = '0; ee2 = '0; de1 = '0; de2 = '0;
    rt1 = 0; rt2 = 0; last_load = 0;
  endtask

  task automatic step(logic ld, logic md, block_t p, block_t ek, block_t c, block_t dk, logic is_rt, block_t rt_pt);
    @(negedge clk);
    check(128'(enc_done), 128'(ev2), "enc_done");
    check(128'(dec_done), 128'(dv2), "dec_done");
    check(ct_out, ee2, "cipher_text_out");
    check(pt_out, de2, "plain_text_out");
    if (!ev2 && !dv2 && cycle > 4) n_idle_hold++;
    if (enc_done && dec_done) n_both_done++;
    if (ev2) begin
      inflight2.ct = ct_out;
      sent.push_back(inflight2);
    end
    if (dv2 && rt2) begin
      check(pt_out, rt_pt2, "round trip gives back the plaintext");
      n_roundtrip++;
    end
    load = ld; mode_in = md; pt_in = p; enc_key = ek; ct_in = c; dec_key = dk;
    if (ld && last_load) n_b2b++;
    if (ld && md) n_mode1++;
    if (ld && !md) n_mode0++;
    last_load = ld;
    ev2 = ev1; dv2 = dv1; rt2 = rt1; rt_pt2 = rt_pt1; inflight2 = inflight1;
    if (ev1) ee2 = ee1;
    if (dv1) de2 = de1;
    ev1 = ld; dv1 = ld; rt1 = ld && is_rt; rt_pt1 = rt_pt;
    if (ld) begin
      ee1 = ref_enc(p, ek, md);
      de1 = ref_dec(c, dk, md);
      inflight1 = '{ct: '0, pt: p, key: ek, mode: md};
    end
  endtask

  initial begin
    block_t keys [3];
    logic   md;
    ref_init();
    n_mode1 = 0; n_mode0 = 0; n_switch = 0; n_b2b = 0; n_idle_hold = 0;
    n_both_done = 0; n_roundtrip = 0; n_reset = 0;
    rst = 1'b1; load = 0; mode_in = 0; pt_in = '0; enc_key = '0; ct_in = '0; dec_key = '0;
    model_reset();
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 3; i++) keys[i] = rand128();
    md = 1'b1;
    last_mode = md;

    for (int n = 0; n < 800; n++) begin
      msg_t m;
      logic ld;
      if (n % 100 == 99) begin
        // end of a session: drain, then switch the mode
        repeat (3) step(1'b0, md, '0, '0, '0, '0, 1'b0, '0);
        sent.delete();
        md = ~md;
        n_switch++;
      end
      ld = ($urandom % 5) != 0;
      if (ld && sent.size() > 0 && ($urandom % 4) != 0) begin
        m = sent.pop_front();
        step(1'b1, md, rand128(), keys[$urandom % 3], m.ct, m.key, 1'b1, m.pt);
      end else begin
        step(ld, md, rand128(), keys[$urandom % 3], rand128(), keys[$urandom % 3], 1'b0, '0);
      end
      if (n == 400) begin
        // asynchronous reset with blocks in flight
        step(1'b1, md, rand128(), keys[0], rand128(), keys[1], 1'b0, '0);
        #2 rst = 1'b1;
        #1 check(ct_out | pt_out, '0, "asynchronous reset clears both outputs");
        check(128'({enc_done, dec_done}), 0, "asynchronous reset clears done");
        n_reset++;
        model_reset();
        sent.delete();
        @(negedge clk);
        rst = 1'b0; load = 1'b0;
      end
    end
    repeat (3) step(1'b0, md, '0, '0, '0, '0, 1'b0, '0);

    $display("mechanisms: mode1=%0d mode0=%0d switch=%0d back_to_back=%0d idle_hold=%0d both_done=%0d round_trip=%0d async_reset=%0d",
             n_mode1, n_mode0, n_switch, n_b2b, n_idle_hold, n_both_done, n_roundtrip, n_reset);
    checks++; if (n_mode1 == 0)     begin failures++; $display("FAIL no mode 1 block"); end
    checks++; if (n_mode0 == 0)     begin failures++; $display("FAIL no mode 0 block"); end
    checks++; if (n_switch == 0)    begin failures++; $display("FAIL no mode switch"); end
    checks++; if (n_b2b == 0)       begin failures++; $display("FAIL no back-to-back loads"); end
    checks++; if (n_idle_hold == 0) begin failures++; $display("FAIL no idle cycle"); end
    checks++; if (n_both_done == 0) begin failures++; $display("FAIL cores never finished together"); end
    checks++; if (n_roundtrip == 0) begin failures++; $display("FAIL no round trip"); end
    checks++; if (n_reset == 0)     begin failures++; $display("FAIL no asynchronous reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
