// key_gen: on-the-fly AES-128 round key generator.
//
// Four 32-bit registers W0..W3 hold the current round key (W0 in
// key_out[127:96]). load copies key_in; en advances one round per clock:
//
//   forward (dcryp = 0), round i-1 -> i:
//     w0' = W0 ^ SubWord(RotWord(W3)) ^ Rcon[i]
//     w1' = W1 ^ w0',  w2' = W2 ^ w1',  w3' = W3 ^ w2'
//   backward (dcryp = 1), round i -> i-1:
//     w3' = W3 ^ W2,  w2' = W2 ^ W1,  w1' = W1 ^ W0
//     w0' = W0 ^ SubWord(RotWord(w3')) ^ Rcon[i]
//
// The module has no S-boxes of its own: key_sub_out carries RotWord of W3
// (forward) or of W3 ^ W2 (backward) to the Data Unit, whose S-boxes return
// SubWord of it on key_sub_in in the same cycle. Rcon (rcon_in) comes from the
// controller. One structure serves both directions; the register chain and
// the XOR networks follow the design's two key generator diagrams.
//
// Timing: registers update on the rising edge; load has priority over en.
// The key is always loaded before use, so there is no reset.
module key_gen
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         load,
  input  logic         en,
  input  logic         dcryp,
  input  logic [127:0] key_in,
  input  word_t        rcon_in,
  input  word_t        key_sub_in,   // SubWord(key_sub_out) from the S-boxes
  output word_t        key_sub_out,  // RotWord of the word to substitute
  output logic [127:0] key_out
);

  word_t w [4];
  word_t w_next [4];
  word_t w3_prev;

  assign w3_prev     = w[3] ^ w[2];
  assign key_sub_out = dcryp ? {w3_prev[23:0], w3_prev[31:24]} : {w[3][23:0], w[3][31:24]};

  always_comb begin
    if (dcryp) begin
      w_next[3] = w3_prev;
      w_next[2] = w[2] ^ w[1];
      w_next[1] = w[1] ^ w[0];
      w_next[0] = w[0] ^ key_sub_in ^ rcon_in;
    end else begin
      w_next[0] = w[0] ^ key_sub_in ^ rcon_in;
      w_next[1] = w[1] ^ w_next[0];
      w_next[2] = w[2] ^ w_next[1];
      w_next[3] = w[3] ^ w_next[2];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (load)    w[i] <= key_in[127 - 32*i -: 32];
      else if (en) w[i] <= w_next[i];
    end
  end

  assign key_out = {w[0], w[1], w[2], w[3]};

endmodule
