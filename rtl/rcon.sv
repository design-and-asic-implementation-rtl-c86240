// rcon: round constant of the key schedule.
//
// For round i = 1..10 the constant is x^(i-1) in GF(2^8) with the Rijndael
// reduction polynomial x^8+x^4+x^3+x+1: 01 02 04 08 10 20 40 80 1B 36.
// It is XORed into the most significant byte of the rotated, substituted word.
// Round numbers outside 1..10 return 00. Combinational.
module rcon
  import rijndael_pkg::*;
(
  input  logic [3:0] round,
  output byte_t      rcon_out
);

  always_comb begin
    unique case (round)
      4'd1:    rcon_out = 8'h01;
      4'd2:    rcon_out = 8'h02;
      4'd3:    rcon_out = 8'h04;
      4'd4:    rcon_out = 8'h08;
      4'd5:    rcon_out = 8'h10;
      4'd6:    rcon_out = 8'h20;
      4'd7:    rcon_out = 8'h40;
      4'd8:    rcon_out = 8'h80;
      4'd9:    rcon_out = 8'h1B;
      4'd10:   rcon_out = 8'h36;
      default: rcon_out = 8'h00;
    endcase
  end

endmodule
