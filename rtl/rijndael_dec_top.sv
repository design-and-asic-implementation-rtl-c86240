// rijndael_dec_top: modified Rijndael decryption core (128-bit block and key).
//
// dec_key is the same cipher key that was used to encrypt. The core expands it
// forward with key_expand and applies the round keys in reverse order:
// AddRoundKey with round key NR, then nine dec_round stages (Inverse ShiftRow,
// Inverse ByteSub, AddRoundKey with round keys NR-1..1, Inverse MixColumn) and a
// final dec_round without Inverse MixColumn that adds round key 0. mode_in must
// be the ShiftRow mode used for encryption.
//
// Timing is the same as the encryption core: inputs are captured on the edge
// where load = 1, plain_text_out and a one-cycle dec_done follow on the next
// edge, one block may be loaded per cycle, and rst (asynchronous, active high)
// clears all registers.
//
// The step order, the reversed round keys and the two-cycle latency follow the
// original design. Taking the cipher key (not the last round key) on dec_key and
// running a private forward key schedule are choices of this implementation.
module rijndael_dec_top
  import rijndael_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   load,
  input  logic   mode_in,
  input  block_t cipher_text_in,
  input  block_t dec_key,
  output block_t plain_text_out,
  output logic   dec_done
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
        text_q <= cipher_text_in;
        key_q  <= dec_key;
        mode_q <= mode_in;
      end
    end
  end

  // Key schedule and inverse rounds; state[r] is the state after using round key NR-r
  round_keys_t rk;
  block_t      state [0:NR];

  key_expand u_keys (.key(key_q), .round_keys(rk));

  add_round_key u_ark0 (.state_in(text_q), .round_key(rk[NR]), .state_out(state[0]));

  for (genvar r = 1; r <= NR; r++) begin : g_round
    dec_round #(.FINAL(r == NR)) u_round (
      .mode_in  (mode_q),
      .state_in (state[r-1]),
      .round_key(rk[NR-r]),
      .state_out(state[r])
    );
  end

  // Output stage
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      plain_text_out <= '0;
      dec_done       <= 1'b0;
    end else begin
      dec_done <= valid_q;
      if (valid_q) plain_text_out <= state[NR];
    end
  end

endmodule
