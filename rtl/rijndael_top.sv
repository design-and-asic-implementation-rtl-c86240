// rijndael_top: modified Rijndael cipher with an encryption core and a
// decryption core side by side.
//
// rij1 encrypts plain_text_in with enc_key while rij2 decrypts cipher_text_in
// with dec_key, independently, so one party's data can be encrypted while
// another's is decrypted. The two cores share clk, rst (asynchronous, active
// high), load and mode_in. Each result appears, with its one-cycle done pulse,
// two clock edges after the edge on which load was high; a new pair of blocks
// may be loaded every cycle. mode_in (1: ShiftRow LS1302, 0: LS2031) is meant
// to stay constant for a session and must match between the sender's
// encryption and the receiver's decryption. Port and instance names follow the
// original design.
module rijndael_top
  import rijndael_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   load,
  input  logic   mode_in,
  input  block_t plain_text_in,
  input  block_t enc_key,
  output block_t cipher_text_out,
  output logic   enc_done,
  input  block_t cipher_text_in,
  input  block_t dec_key,
  output block_t plain_text_out,
  output logic   dec_done
);

  rijndael_enc_top rij1 (
    .clk            (clk),
    .rst            (rst),
    .load           (load),
    .mode_in        (mode_in),
    .plain_text_in  (plain_text_in),
    .enc_key        (enc_key),
    .cipher_text_out(cipher_text_out),
    .enc_done       (enc_done)
  );

  rijndael_dec_top rij2 (
    .clk            (clk),
    .rst            (rst),
    .load           (load),
    .mode_in        (mode_in),
    .cipher_text_in (cipher_text_in),
    .dec_key        (dec_key),
    .plain_text_out (plain_text_out),
    .dec_done       (dec_done)
  );

endmodule
