// key_expand: key schedule of the modified Rijndael cipher.
//
// Expands the 128-bit cipher key into the round keys 0..NR (round key 0 is
// the cipher key). Round key i is built from round key i-1 as words w0..w3:
//   t  = SubWord(RotWord(w3 of key i-1)) ^ {rcon(i), 00, 00, 00}
//   w0 = w0' ^ t,  w1 = w1' ^ w0,  w2 = w2' ^ w1,  w3 = w3' ^ w2
// where SubWord uses the triple-substitution S-box (s3_sbox), not the plain
// Rijndael S-box; this is what makes the schedule differ from Rijndael's.
// Interface: key in, round_keys[0:NR] out. The whole schedule is unrolled
// combinational logic (4 S-boxes and one rcon per round), so every round key
// is ready in the same cycle as the key. The use of the triple-substitution
// S-box in SubWord follows the original design (it reproduces its published
// round keys for the all-zero key); the rest is the standard Rijndael schedule.
module key_expand
  import rijndael_pkg::*;
(
  input  block_t      key,
  output round_keys_t round_keys
);

  assign round_keys[0] = key;

  for (genvar i = 1; i <= NR; i++) begin : g_round
    word_t prev [4];
    word_t rot, sub, t;
    word_t w [4];
    byte_t rc;

    for (genvar k = 0; k < 4; k++) begin : g_word
      assign prev[k] = round_keys[i-1][127 - 32*k -: 32];
    end

    assign rot = {prev[3][23:0], prev[3][31:24]};

    for (genvar k = 0; k < 4; k++) begin : g_sub
      s3_sbox u_sbox (.in_byte(rot[31 - 8*k -: 8]), .out_byte(sub[31 - 8*k -: 8]));
    end

    rcon u_rcon (.round(4'(i)), .rcon_out(rc));

    assign t    = sub ^ {rc, 24'h000000};
    assign w[0] = prev[0] ^ t;
    assign w[1] = prev[1] ^ w[0];
    assign w[2] = prev[2] ^ w[1];
    assign w[3] = prev[3] ^ w[2];

    assign round_keys[i] = {w[0], w[1], w[2], w[3]};
  end

endmodule
