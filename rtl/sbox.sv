// sbox: AES S-box and inverse S-box computed from their algebraic definition
// rather than stored in a table.
//
// Encryption (inv = 0): multiplicative inverse in GF(2^8) followed by the
// affine transform AT. Decryption (inv = 1): inverse affine transform AT^-1
// followed by the multiplicative inverse. Two 2:1 multiplexers around a
// single inversion unit select the order, so one inverter serves both
// directions; this structure follows the SBox block diagram of the design.
//
// The inversion unit itself is this design's own choice: it raises the input
// to the power 254 (= a^-1 for a != 0, and 0 for 0) with a fixed chain of
// squarings and multiplications: a^254 = a^240 * a^14, with a^240 reached by
// squaring a^15 four times. A squaring is written as a product of a value with
// itself; in GF(2^8) it is linear, and synthesis reduces it to XORs.
//
// Interface: purely combinational, out = S(in) or S^-1(in) in the same cycle.
module sbox
  import aes_pkg::*;
(
  input  byte_t in,
  input  logic  inv,
  output byte_t out
);

  byte_t at_inv_out;  // AT^-1(in)
  byte_t inv_in;      // input of the multiplicative inversion unit
  byte_t inv_out;     // its output
  byte_t at_out;      // AT(inv_out)

  // Inverse affine transform: b_i = a_(i+2) ^ a_(i+5) ^ a_(i+7) ^ {05}_i.
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      at_inv_out[i] = in[(i + 2) % 8] ^ in[(i + 5) % 8] ^ in[(i + 7) % 8];
    end
    at_inv_out = at_inv_out ^ 8'h05;
  end

  assign inv_in = inv ? at_inv_out : in;

  // Multiplicative inverse by exponentiation to 254.
  always_comb begin
    byte_t a2, a3, a6, a12, a14, a15, a30, a60, a120, a240;
    a2   = gf_mul(inv_in, inv_in);
    a3   = gf_mul(a2, inv_in);
    a6   = gf_mul(a3, a3);
    a12  = gf_mul(a6, a6);
    a14  = gf_mul(a12, a2);
    a15  = gf_mul(a12, a3);
    a30  = gf_mul(a15, a15);
    a60  = gf_mul(a30, a30);
    a120 = gf_mul(a60, a60);
    a240 = gf_mul(a120, a120);
    inv_out = gf_mul(a240, a14);
  end

  // Affine transform: b_i = a_i ^ a_(i+4) ^ a_(i+5) ^ a_(i+6) ^ a_(i+7) ^ {63}_i.
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      at_out[i] = inv_out[i] ^ inv_out[(i + 4) % 8] ^ inv_out[(i + 5) % 8]
                ^ inv_out[(i + 6) % 8] ^ inv_out[(i + 7) % 8];
    end
    at_out = at_out ^ 8'h63;
  end

  assign out = inv ? inv_out : at_out;

endmodule
