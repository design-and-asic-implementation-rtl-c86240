// rijndael_enc_top: modified Rijndael encryption core (128-bit block and key).
//
// Datapath: AddRoundKey with the cipher key, nine enc_round stages with
// MixColumn and a final enc_round without it, all unrolled as combinational
// logic, with the key schedule (key_expand) alongside.
//
// Timing: on a rising clk edge with load = 1, plain_text_in, enc_key and
// mode_in are captured into input registers. On the next edge the ten rounds'
// result is captured into cipher_text_out and enc_done is high for that one
// cycle. The result therefore appears two clock edges after load, and since the
// two register stages form a pipeline a new block may be loaded every cycle.
// cipher_text_out holds its value until the next result. rst is asynchronous
// and active high and clears all registers.
//
// mode_in selects the ShiftRow variant (1: LS1302, 0: LS2031); the same block
// and key give a different ciphertext in each mode.
//
// The round structure, the two-cycle latency and the done output follow the
// original design. The asynchronous active-high reset, the one-cycle done pulse
// and accepting a new block on every cycle are choices of this implementation.
module rijndael_enc_top
  import rijndael_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   load,
  input  logic   mode_in,
  input  block_t plain_text_in,
  input  block_t enc_key,
  output block_t cipher_text_out,
  output logic   enc_done
);

  // Input stage
  block_t text_q, key_q;
  logic   mode_q, valid_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      text_q  <= '0;
      key_q   <= '0;
      mode_q  <= 1'b0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= load;
      if (load) begin
        text_q <= plain_text_in;
        key_q  <= enc_key;
        mode_q <= mode_in;
      end
    end
  end

  // Key schedule and rounds
  round_keys_t rk;
  block_t      state [0:NR];

  key_expand u_keys (.key(key_q), .round_keys(rk));

  add_round_key u_ark0 (.state_in(text_q), .round_key(rk[0]), .state_out(state[0]));

  for (genvar r = 1; r <= NR; r++) begin : g_round
    enc_round #(.FINAL(r == NR)) u_round (
      .mode_in  (mode_q),
      .state_in (state[r-1]),
      .round_key(rk[r]),
      .state_out(state[r])
    );
  end

  // Output stage
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cipher_text_out <= '0;
      enc_done        <= 1'b0;
    end else begin
      enc_done <= valid_q;
      if (valid_q) cipher_text_out <= state[NR];
    end
  end

endmodule
