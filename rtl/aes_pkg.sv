// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128
// co-processor (aes_top and the blocks below it).
//
// GF(2^8) arithmetic uses the AES field polynomial m(x) = x^8+x^4+x^3+x+1.
// Multiplication by {02} ("xtime") is a one-bit left shift with the bits
// 4, 3, 1 and 0 of the product corrected by the bit shifted out, i.e. three
// XOR gates; every other constant multiple is built from xtime stages and
// XORs. The round constants RC[1..10] are successive xtime powers of {01}.
// The controller state encoding and the cycle budgets of the controller are
// also defined here.
package aes_pkg;

  typedef logic [7:0]  byte_t;
  typedef logic [31:0] word_t;

  // Number of AES-128 rounds.
  localparam int unsigned NR = 10;

  // Cycles spent in LOAD: four column loads, and for decryption ten extra
  // cycles to run the key schedule forward to the last round key.
  localparam int unsigned LOAD_ENC_CYCLES = 4;
  localparam int unsigned LOAD_DEC_CYCLES = 14;

  // The six controller states.
  typedef enum logic [2:0] {
    ST_IDLE,
    ST_LOAD,
    ST_ADD_RKEY,
    ST_SUBBYTE_SHFROW,
    ST_MIXCOL,
    ST_DONE
  } ctrl_state_e;

  // Multiply by {02}: {s6, s5, s4, s3^s7, s2^s7, s1, s0^s7, s7}.
  function automatic byte_t xtime(byte_t s);
    return {s[6], s[5], s[4], s[3] ^ s[7], s[2] ^ s[7], s[1], s[0] ^ s[7], s[7]};
  endfunction

  // General GF(2^8) product, shift-and-add over the bits of b.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t acc;
    byte_t p;
    acc = '0;
    p   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc = acc ^ p;
      p = xtime(p);
    end
    return acc;
  endfunction

  // Round constant word Rcon[i] = (RC[i], 00, 00, 00), i = 1..10.
  function automatic word_t rcon(int unsigned i);
    byte_t rc;
    rc = 8'h01;
    for (int unsigned k = 2; k <= NR; k++) begin
      if (k <= i) rc = xtime(rc);
    end
    return {rc, 24'h000000};
  endfunction

  // Byte c (0 = most significant) of a 32-bit word.
  function automatic byte_t word_byte(word_t w, int unsigned c);
    return w[31 - 8*c -: 8];
  endfunction

endpackage
