// aes_top: AES-128 encryption/decryption co-processor for low-frequency RFID
// tags, built for small area rather than speed.
//
// Three units: data_unit (the State as a 4x4 byte-cell array with four
// shared S-boxes and one MixColumn unit), key_gen (round keys computed on
// the fly, one per clock, using the Data Unit's S-boxes for SubWord) and
// aes_control (six-state sequencer). The key input goes straight to the key
// generator and the result is read from the Data Unit's State.
//
// Interface: hold start high with dcryp, din and key stable; done rises after
// 93 clocks for encryption or 103 for decryption (counting the clock in which
// start is first seen and the first done clock) and stays high, with dout
// valid, until start is released. reset is synchronous, active high.
// Byte order follows FIPS-197: din[127:120] is the first input byte.
module aes_top
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         reset,
  input  logic         dcryp,
  input  logic         start,
  input  logic [127:0] din,
  input  logic [127:0] key,
  output logic [127:0] dout,
  output logic         done
);

  logic        load_din, shf_h, shf_v, add_k, sub_k, du_dcryp;
  logic [1:0]  msel;
  word_t       state_word;
  logic        load_key, kg_en, kg_dcryp;
  word_t       rcon_word;
  word_t       kg_sub_out, du_sub_out;
  logic [127:0] round_key;

  aes_control u_control (
    .clk        (clk),
    .reset      (reset),
    .start      (start),
    .dcryp_in   (dcryp),
    .din        (din),
    .load_din   (load_din),
    .shf_h      (shf_h),
    .shf_v      (shf_v),
    .add_k      (add_k),
    .sub_k      (sub_k),
    .dcryp      (du_dcryp),
    .msel       (msel),
    .state_word (state_word),
    .load_key   (load_key),
    .kg_en      (kg_en),
    .kg_dcryp   (kg_dcryp),
    .rcon_word  (rcon_word),
    .done       (done),
    .state_o    ()
  );

  data_unit u_data (
    .clk         (clk),
    .dcryp       (du_dcryp),
    .key         (round_key),
    .state_in    (state_word),
    .load_din    (load_din),
    .msel        (msel),
    .shf_h       (shf_h),
    .shf_v       (shf_v),
    .add_k       (add_k),
    .sub_k       (sub_k),
    .key_sub_in  (kg_sub_out),
    .key_sub_out (du_sub_out),
    .sout        (),
    .dout        (dout)
  );

  key_gen u_keygen (
    .clk         (clk),
    .load        (load_key),
    .en          (kg_en),
    .dcryp       (kg_dcryp),
    .key_in      (key),
    .rcon_in     (rcon_word),
    .key_sub_in  (du_sub_out),
    .key_sub_out (kg_sub_out),
    .key_out     (round_key)
  );

endmodule
