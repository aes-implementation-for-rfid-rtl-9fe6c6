// mcol: MixColumn / InvMixColumn of one State column.
//
// The column (s0, s1, s2, s3), s0 in the top row, is multiplied by
// a(x) = {03}x^3 + {01}x^2 + {01}x + {02} modulo x^4 + 1 for encryption
// (dcryp = 0) or by a^-1(x) = {0b}x^3 + {0d}x^2 + {09}x + {0e} for
// decryption (dcryp = 1). Every constant product is decomposed, as the
// design prescribes, into multiply-by-{02} stages (xtime, three XOR gates
// each) and XORs: x4 = xtime(x2), x8 = xtime(x4), {03} = x2^s,
// {09} = x8^s, {0b} = x8^x2^s, {0d} = x8^x4^s, {0e} = x8^x4^x2.
//
// Interface: purely combinational; the Data Unit shifts one column per clock
// through this module, so a whole MixColumn takes four clocks.
module mcol
  import aes_pkg::*;
(
  input  word_t col_in,   // {s0, s1, s2, s3}, s0 in bits 31:24
  input  logic  dcryp,
  output word_t col_out
);

  byte_t s  [4];
  byte_t x2 [4];
  byte_t x4 [4];
  byte_t x8 [4];
  byte_t m2 [4];  // encryption {02}, decryption {0e}
  byte_t m3 [4];  // encryption {03}, decryption {0b}
  byte_t md [4];  // decryption {0d}
  byte_t m9 [4];  // decryption {09}

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      s[i]  = word_byte(col_in, i);
      x2[i] = xtime(s[i]);
      x4[i] = xtime(x2[i]);
      x8[i] = xtime(x4[i]);
      if (dcryp) begin
        m2[i] = x8[i] ^ x4[i] ^ x2[i];  // {0e}
        m3[i] = x8[i] ^ x2[i] ^ s[i];   // {0b}
        md[i] = x8[i] ^ x4[i] ^ s[i];   // {0d}
        m9[i] = x8[i] ^ s[i];           // {09}
      end else begin
        m2[i] = x2[i];                  // {02}
        m3[i] = x2[i] ^ s[i];           // {03}
        md[i] = s[i];                   // {01}
        m9[i] = s[i];                   // {01}
      end
    end
    // Row i of the circulant matrix: {m2, m3, md, m9} rotated right by i,
    // e.g. encryption row 0 = 02*s0 ^ 03*s1 ^ 01*s2 ^ 01*s3,
    // decryption row 0 = 0e*s0 ^ 0b*s1 ^ 0d*s2 ^ 09*s3.
    for (int i = 0; i < 4; i++) begin
      col_out[31 - 8*i -: 8] = m2[i] ^ m3[(i + 1) % 4] ^ md[(i + 2) % 4] ^ m9[(i + 3) % 4];
    end
  end

endmodule
