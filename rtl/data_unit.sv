// data_unit: the State storage and round datapath of the AES co-processor.
//
// Sixteen data_cell bytes form a 4x4 array, cell (r, c) holding State byte
// s[r][c] (FIPS-197 order: byte k of the 128-bit block is s[k%4][k/4]).
// Four shared sbox instances sit below the array and one mcol instance on
// its left. Operations, each selected by one control line:
//
//   shf_h, load_din = 1  Load: every row shifts one byte left; the right
//                        column takes the 32-bit word state_in (row 0 in
//                        bits 31:24). Four clocks load a block, first word
//                        ending in column 0.
//   shf_h, load_din = 0  MixColumn: column 0 passes through mcol, the result
//                        enters column 3 and the other columns shift left.
//                        Four clocks mix all four columns.
//   shf_v                SubByte + ShiftRow: rows shift down; row 3 goes
//                        through the four S-boxes and re-enters row 0
//                        rotated left by msel bytes. Four clocks, each row
//                        passing the S-boxes once.
//   add_k                AddRoundKey: every cell XORs its byte of key.
//
// With sub_k = 1 the S-boxes take key_sub_in instead of row 3 and always run
// forward; their output is key_sub_out, which is the key generator's
// SubWord. The shared S-boxes are the design's; forcing them to the forward
// direction for the key (the key schedule never needs the inverse S-box) is
// this module's reading of how the sharing works. dout exposes the whole
// State in parallel and sout the mcol output.
//
// Timing: all State registers update on the rising edge; the S-box, mcol
// and key paths are combinational.
module data_unit
  import aes_pkg::*;
(
  input  logic           clk,
  input  logic           dcryp,        // 1: inverse S-box and InvMixColumn
  input  logic [127:0]   key,          // current round key, word 0 in 127:96
  input  word_t          state_in,     // input column during load
  input  logic           load_din,
  input  logic [1:0]     msel,         // ShiftRow rotation applied to row 0 input
  input  logic           shf_h,
  input  logic           shf_v,
  input  logic           add_k,
  input  logic           sub_k,        // S-boxes serve the key generator
  input  word_t          key_sub_in,   // rotated word from the key generator
  output word_t          key_sub_out,  // SubWord(key_sub_in)
  output word_t          sout,         // mcol output
  output logic [127:0]   dout          // the State, same byte order as key
);

  byte_t cell_q  [4][4];
  byte_t h_in    [4][4];
  byte_t v_in    [4][4];
  byte_t sb_in   [4];
  byte_t sb_out  [4];
  word_t col0;
  logic  sb_inv;

  assign sb_inv = dcryp & ~sub_k;

  for (genvar c = 0; c < 4; c++) begin : g_sbox
    assign sb_in[c] = sub_k ? word_byte(key_sub_in, c) : cell_q[3][c];
    sbox u_sbox (.in(sb_in[c]), .inv(sb_inv), .out(sb_out[c]));
    assign key_sub_out[31 - 8*c -: 8] = sb_out[c];
  end

  assign col0 = {cell_q[0][0], cell_q[1][0], cell_q[2][0], cell_q[3][0]};
  mcol u_mcol (.col_in(col0), .dcryp(dcryp), .col_out(sout));

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      if (c < 3) begin : g_hmid
        assign h_in[r][c] = cell_q[r][c+1];
      end else begin : g_hright
        assign h_in[r][c] = load_din ? word_byte(state_in, r) : word_byte(sout, r);
      end
      if (r > 0) begin : g_vmid
        assign v_in[r][c] = cell_q[r-1][c];
      end else begin : g_vtop
        assign v_in[r][c] = sb_out[(c + msel) % 4];
      end
      data_cell u_cell (
        .clk   (clk),
        .shf_h (shf_h),
        .shf_v (shf_v),
        .add_k (add_k),
        .h_in  (h_in[r][c]),
        .v_in  (v_in[r][c]),
        .key   (key[127 - 8*(4*c + r) -: 8]),
        .q     (cell_q[r][c])
      );
      assign dout[127 - 8*(4*c + r) -: 8] = cell_q[r][c];
    end
  end

  // At most one State operation per clock, and the S-boxes cannot serve the
  // key generator while the State is shifting through them.
  a_one_op: assert property (@(posedge clk) $onehot0({shf_h, shf_v, add_k}));
  a_sbox_free: assert property (@(posedge clk) !(sub_k && shf_v));

endmodule
