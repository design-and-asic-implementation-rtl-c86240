// tb_rijndael_dec_top: self-checking testbench for the decryption core rijndael_dec_top.
//
// Checks, against the behavioural reference model in rijndael_ref_pkg:
//  - reset clears the outputs, also when applied asynchronously mid-cycle;
//  - latency: dec_done rises exactly two rising edges after the edge that
//    samples load = 1, and only for one cycle;
//  - two known answers (one per ShiftRow mode);
//  - a random stream with loads in consecutive cycles, idle cycles in which
//    the output must hold, and mode changes between sessions.
// Inputs are driven on the falling edge; a two-stage model of the pipeline in
// the stimulus loop says what the outputs must be after each rising edge.
module tb_rijndael_dec_top;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  logic   clk = 1'b0;
  logic   rst, load, mode_in;
  block_t din, key, dout;
  logic   done;

  rijndael_dec_top dut (
    .clk(clk), .rst(rst), .load(load), .mode_in(mode_in),
    .cipher_text_in(din), .dec_key(key), .plain_text_out(dout), .dec_done(done)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // pipeline model: stage 1 = inputs captured, stage 2 = output register
  logic   v1, v2;
  block_t e1, e2;

  task automatic model_reset();
    v1 = 0; v2 = 0; e1 = '0; e2 = '0;
  endtask

  // check the outputs, then drive the inputs for the next rising edge
  task automatic step(logic ld, logic md, block_t d, block_t k);
    @(negedge clk);
    check(128'(done), 128'(v2), "done");
    check(dout, e2, "data out");
    load = ld; mode_in = md; din = d; key = k;
    v2 = v1;
    if (v1) e2 = e1;
    v1 = ld;
    if (ld) e1 = ref_dec(d, k, md);
  endtask

  block_t kv_in [2], kv_key [2], kv_out [2];
  logic   kv_mode [2];

  initial begin
    int lat;
    block_t keys [4];
    logic   md;
    ref_init();
    // ciphertexts of plaintext 12345678_87654321_23456789_98765432 under the zero key, one per mode
    kv_in[0] = 128'hb77217bf_5cc35f59_a1fe84ad_47784d33; kv_key[0] = '0; kv_mode[0] = 1'b0;
    kv_out[0] = 128'h12345678_87654321_23456789_98765432;
    kv_in[1] = 128'ha60d0124_7de0ee08_76faa0a9_2770a629; kv_key[1] = '0; kv_mode[1] = 1'b1;
    kv_out[1] = 128'h12345678_87654321_23456789_98765432;
    rst = 1'b1; load = 1'b0; mode_in = 1'b0; din = '0; key = '0;
    model_reset();
    repeat (2) @(negedge clk);
    check(dout, '0, "reset value");
    check(128'(done), 0, "done in reset");
    rst = 1'b0;

    // latency of a single block
    @(negedge clk);
    load = 1'b1; mode_in = 1'b1; din = kv_in[1]; key = kv_key[1];
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    load = 1'b0;
    while (!done && lat < 10) begin
      @(posedge clk); lat++;
      #1;
    end
    check(128'(lat), 128'd1, "edges from load edge to done, minus one");
    check(dout, kv_out[1], "known answer, mode 1");
    @(posedge clk); #1;
    check(128'(done), 0, "done is a one-cycle pulse");
    check(dout, kv_out[1], "output held after done");

    // the other mode
    v1 = 0; v2 = 0; e1 = kv_out[1]; e2 = kv_out[1];
    step(1'b1, kv_mode[0], kv_in[0], kv_key[0]);
    step(1'b0, 1'b0, '0, '0);
    step(1'b0, 1'b0, '0, '0);
    check(dout, kv_out[0], "known answer, mode 0");

    // random stream: sessions of constant mode and key set, bursts and gaps
    for (int i = 0; i < 4; i++) keys[i] = rand128();
    md = 1'b0;
    for (int n = 0; n < 600; n++) begin
      if (n % 50 == 0) md = ~md;
      step(($urandom % 4) != 0, md, rand128(), keys[$urandom % 4]);
    end
    step(1'b0, md, '0, '0);
    step(1'b0, md, '0, '0);
    step(1'b0, md, '0, '0);

    // asynchronous reset in the middle of a cycle, with data in flight
    step(1'b1, md, rand128(), keys[0]);
    step(1'b1, md, rand128(), keys[1]);
    #2 rst = 1'b1;
    #1 check(dout, '0, "asynchronous reset clears the output");
    check(128'(done), 0, "asynchronous reset clears done");
    model_reset();
    @(negedge clk);
    rst = 1'b0; load = 1'b0;
    step(1'b0, md, '0, '0);
    step(1'b0, md, '0, '0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
