// aes_control: the six-state controller of the AES-128 co-processor.
//
// States (Moore machine, one clock per state visit unless counted):
//   IDLE            wait for start; latch the direction (dcryp).
//   LOAD            shift din into the Data Unit, one 32-bit column per
//                   clock (4 clocks), and load the cipher key. For
//                   decryption it stays 14 clocks: clocks 3..12 run the key
//                   generator forward ten rounds to the last round key and
//                   clock 13 switches it to backward mode.
//   ADD_RKEY        AddRoundKey (1 clock).
//   SUBBYTE_SHFROW  SubByte + ShiftRow by shifting the State down (4 clocks).
//   MIXCOL          MixColumn by shifting the State left (4 clocks); in its
//                   first clock the key generator makes the next round key
//                   while the S-boxes are free.
//   DONE            done = 1 until start is released.
//
// Encryption: LOAD, ADD, 9 x (SUB, MIX, ADD), SUB, ADD, DONE.
// Decryption: LOAD, ADD, SUB, ADD, 9 x (MIX, SUB, ADD), DONE.
// Counting the IDLE clock that sees start and the first DONE clock, an
// encryption takes 93 clocks and a decryption 103, as the design specifies.
//
// The round that has no MIXCOL before its AddRoundKey (round 10 when
// encrypting, round 9 key when decrypting) gets its key from a key step
// taken in the previous ADD_RKEY clock, in which the S-boxes are idle and
// the old key is consumed at the same edge that replaces it. That placement,
// the level-sensitive start/done handshake (start held until done, done
// dropped when start falls) and the synchronous active-high reset are this
// design's choices.
module aes_control
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic         dcryp_in,
  input  logic [127:0] din,
  // Data Unit controls
  output logic         load_din,
  output logic         shf_h,
  output logic         shf_v,
  output logic         add_k,
  output logic         sub_k,
  output logic         dcryp,
  output logic [1:0]   msel,
  output word_t        state_word,
  // Key Generator controls
  output logic         load_key,
  output logic         kg_en,
  output logic         kg_dcryp,
  output word_t        rcon_word,
  output logic         done,
  output ctrl_state_e  state_o
);

  ctrl_state_e state, state_n;
  logic [3:0]  cnt, cnt_n;
  logic [3:0]  round, round_n;
  logic        mode;          // latched direction, 1 = decrypt
  logic [3:0]  rcon_idx;

  assign state_o  = state;
  assign dcryp    = mode;
  assign kg_dcryp = mode && (state != ST_LOAD);
  assign done     = (state == ST_DONE);
  assign rcon_word = rcon(32'(rcon_idx));

  always_comb begin
    state_n    = state;
    cnt_n      = cnt;
    round_n    = round;
    load_din   = 1'b0;
    shf_h      = 1'b0;
    shf_v      = 1'b0;
    add_k      = 1'b0;
    sub_k      = 1'b0;
    msel       = 2'd0;
    state_word = din[127 - 32*cnt[1:0] -: 32];
    load_key   = 1'b0;
    kg_en      = 1'b0;
    rcon_idx   = 4'd1;

    unique case (state)
      ST_IDLE: begin
        if (start) begin
          state_n = ST_LOAD;
          cnt_n   = '0;
          round_n = '0;
        end
      end

      ST_LOAD: begin
        if (cnt < 4'd4) begin
          load_din = 1'b1;
          shf_h    = 1'b1;
        end
        if (cnt < 4'd3) load_key = 1'b1;
        cnt_n = cnt + 4'd1;
        if (!mode) begin
          if (cnt == 4'(LOAD_ENC_CYCLES - 1)) begin
            state_n = ST_ADD_RKEY;
            cnt_n   = '0;
          end
        end else begin
          if (cnt >= 4'd3 && cnt <= 4'd12) begin
            // forward key step: round key (round) -> (round + 1)
            kg_en    = 1'b1;
            sub_k    = 1'b1;
            rcon_idx = round + 4'd1;
            round_n  = round + 4'd1;
          end
          if (cnt == 4'(LOAD_DEC_CYCLES - 1)) begin
            state_n = ST_ADD_RKEY;
            cnt_n   = '0;
            round_n = '0;
          end
        end
      end

      ST_ADD_RKEY: begin
        add_k = 1'b1;
        if (round == 4'(NR)) begin
          state_n = ST_DONE;
        end else begin
          round_n = round + 4'd1;
          cnt_n   = '0;
          if (!mode) begin
            state_n = ST_SUBBYTE_SHFROW;
            if (round == 4'(NR - 1)) begin
              // key 10, forward, while the S-boxes are idle
              kg_en    = 1'b1;
              sub_k    = 1'b1;
              rcon_idx = 4'(NR);
            end
          end else if (round == 4'd0) begin
            state_n  = ST_SUBBYTE_SHFROW;
            // key 9, backward from key 10, while the S-boxes are idle
            kg_en    = 1'b1;
            sub_k    = 1'b1;
            rcon_idx = 4'(NR);
          end else begin
            state_n = ST_MIXCOL;
          end
        end
      end

      ST_SUBBYTE_SHFROW: begin
        shf_v = 1'b1;
        // row 3 - cnt passes the S-boxes; rotate it left (encrypt) or
        // right (decrypt) by its row number
        msel  = mode ? 2'(cnt + 4'd1) : 2'(4'd3 - cnt);
        cnt_n = cnt + 4'd1;
        if (cnt == 4'd3) begin
          cnt_n = '0;
          if (!mode && round != 4'(NR)) state_n = ST_MIXCOL;
          else                         state_n = ST_ADD_RKEY;
        end
      end

      ST_MIXCOL: begin
        shf_h = 1'b1;
        if (cnt == 4'd0) begin
          kg_en    = 1'b1;
          sub_k    = 1'b1;
          // encrypt: key (round-1) -> round; decrypt: key (11-round) -> (10-round)
          rcon_idx = mode ? 4'(NR + 1) - round : round;
        end
        cnt_n = cnt + 4'd1;
        if (cnt == 4'd3) begin
          cnt_n   = '0;
          state_n = mode ? ST_SUBBYTE_SHFROW : ST_ADD_RKEY;
        end
      end

      ST_DONE: begin
        if (!start) state_n = ST_IDLE;
      end

      default: state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= ST_IDLE;
      cnt   <= '0;
      round <= '0;
      mode  <= 1'b0;
    end else begin
      state <= state_n;
      cnt   <= cnt_n;
      round <= round_n;
      if (state == ST_IDLE && start) mode <= dcryp_in;
    end
  end

  // Controls of the shared datapath never collide.
  a_one_op: assert property (@(posedge clk) disable iff (reset)
                             $onehot0({shf_h, shf_v, add_k}));
  a_sbox_free: assert property (@(posedge clk) disable iff (reset)
                                !(sub_k && shf_v));
  a_round_range: assert property (@(posedge clk) disable iff (reset)
                                  round <= 4'(NR));

endmodule
