// hmac_ctrl: stage controller of the HMAC unit.
//
// A command selects a plain hash or an HMAC, the SHA-2 mode, whether the
// stored key hashes are reused, and the key size K in bytes. An HMAC runs
// through up to five stages, always in this order:
//   NewKeyHash  - only if K > B: the key is streamed through the padding unit
//                 and hashed from the initial values; K0 = Hash(Key) || zeros.
//                 If K <= B the key words are written into the K0 register.
//   KeyIpadHash - one block K0 xor ipad, parallel load, from the initial
//                 values; result stored in K0_Ipad_Hash.
//   TextHash    - the text is streamed through the padding unit (length
//                 counted from B), the first block starting from K0_Ipad_Hash;
//                 result stored in K0_Ipad_Text_Hash.
//   KeyOpadHash - one block K0 xor opad, parallel load, from the initial
//                 values; result stored in K0_Opad_Hash.
//   MACHash     - one block: the padded inner hash, parallel load, starting
//                 from K0_Opad_Hash. The result is the MAC.
// With key_reuse (and valid stored key hashes) only TextHash and MACHash run.
// A plain hash streams the message from the initial values.
//
// Streamed stages: while in S_STREAM the padding unit may pass words into the
// core (stream_en); after word 15 of a block the core is started (S_BSTART)
// and the controller waits for done (S_BWAIT) before the next block.
// Outputs select the sources of the multiplexer in front of the core
// (blk_sel for parallel loads, ext_sel for the stored chaining value).
//
// Stage names and order follow the document; the state encoding and the
// command format are this design's.
module hmac_ctrl
  import sha2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // command
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  hmac_cmd_t   cmd,
  output sha2_mode_t  mode,
  // input routing and padding unit
  output logic        route_key,      // input block feeds the K0 register
  input  logic        key_last_hs,    // last key word written
  output logic        pad_start,
  output logic [63:0] pad_len_offset,
  output logic        stream_en,      // padding unit may write into the core
  input  logic        blk_end_hs,     // word 15 of a block taken by the core
  input  logic        msg_end_hs,     // ... and it was the last block
  // SHA-2 core
  output logic        core_start,
  output h_sel_t      core_h_sel,
  output logic        core_blk_load,
  output logic [1:0]  blk_sel,        // 0: K0^ipad, 1: K0^opad, 2: padded inner hash
  output logic        ext_sel,        // 0: K0_Ipad_Hash, 1: K0_Opad_Hash
  input  logic        core_done,
  // HMAC registers
  output logic        key_clr,
  output logic        key_from_hash,
  output logic        store_ipad,
  output logic        store_text,
  output logic        store_opad,
  input  logic        keys_valid,
  input  sha2_mode_t  keys_mode,
  // result
  output logic        capture,
  output logic        done,
  output logic        busy
);

  typedef enum logic [3:0] {
    S_IDLE, S_KEYLOAD, S_STREAM, S_BSTART, S_BWAIT,
    S_KIPAD, S_KIWAIT, S_KOPAD, S_KOWAIT, S_MAC, S_MWAIT
  } state_t;

  typedef enum logic [1:0] {STG_HASH, STG_NEWKEY, STG_TEXT} stage_t;

  state_t    state_q;
  stage_t    stage_q;
  hmac_cmd_t cmd_q;
  logic      first_q, last_q, reuse_q;
  logic      long_key, can_reuse;

  assign mode      = cmd_q.mode;
  assign long_key  = {5'd0, cmd.key_bytes, 3'd0} > {13'd0, block_bits(cmd.mode)};
  assign can_reuse = cmd.key_reuse && keys_valid && (keys_mode == cmd.mode);

  always_comb begin
    cmd_ready      = (state_q == S_IDLE);
    busy           = (state_q != S_IDLE);
    route_key      = (state_q == S_KEYLOAD);
    stream_en      = (state_q == S_STREAM);
    // pad_start and key_clr are issued in the cycle of the stage transition
    pad_start = ((state_q == S_IDLE) && cmd_valid &&
                 (cmd.op == OP_HASH || can_reuse || long_key)) ||
                ((state_q == S_KIWAIT) && core_done);
    key_clr   = (state_q == S_IDLE) && cmd_valid && (cmd.op == OP_HMAC) && !can_reuse;
    // register writes happen on the edge that ends a stage, so the next stage
    // already sees the stored value
    key_from_hash = (state_q == S_BWAIT) && core_done && last_q && (stage_q == STG_NEWKEY);
    store_text    = (state_q == S_BWAIT) && core_done && last_q && (stage_q == STG_TEXT);
    capture       = ((state_q == S_BWAIT) && core_done && last_q && (stage_q == STG_HASH)) ||
                    ((state_q == S_MWAIT) && core_done);
    store_ipad    = (state_q == S_KIWAIT) && core_done;
    store_opad    = (state_q == S_KOWAIT) && core_done;
    if (state_q == S_IDLE)
      pad_len_offset = (cmd.op == OP_HMAC && can_reuse) ? {53'd0, block_bits(cmd.mode)} : 64'd0;
    else
      pad_len_offset = {53'd0, block_bits(cmd_q.mode)};
    core_start     = 1'b0;
    core_blk_load  = 1'b0;
    core_h_sel     = H_IV;
    blk_sel        = 2'd0;
    ext_sel        = 1'b0;
    case (state_q)
      S_BSTART: begin
        core_start = 1'b1;
        if (!first_q)                   core_h_sel = H_KEEP;
        else if (stage_q == STG_TEXT)   core_h_sel = H_EXT;
      end
      S_KIPAD: begin
        core_start = 1'b1; core_blk_load = 1'b1; blk_sel = 2'd0;
      end
      S_KOPAD: begin
        core_start = 1'b1; core_blk_load = 1'b1; blk_sel = 2'd1;
      end
      S_MAC: begin
        core_start = 1'b1; core_blk_load = 1'b1; blk_sel = 2'd2;
        core_h_sel = H_EXT; ext_sel = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      stage_q       <= STG_HASH;
      cmd_q         <= '0;
      first_q       <= 1'b0;
      last_q        <= 1'b0;
      reuse_q       <= 1'b0;
      done          <= 1'b0;
    end else begin
      done    <= capture;   // output block loaded one cycle after capture
      case (state_q)
        S_IDLE: if (cmd_valid) begin
          cmd_q   <= cmd;
          first_q <= 1'b1;
          last_q  <= 1'b0;
          reuse_q <= 1'b0;
          if (cmd.op == OP_HASH) begin
            stage_q <= STG_HASH;
            state_q <= S_STREAM;
          end else if (can_reuse) begin
            stage_q <= STG_TEXT;
            reuse_q <= 1'b1;
            state_q <= S_STREAM;
          end else if (long_key) begin
            stage_q <= STG_NEWKEY;
            state_q <= S_STREAM;
          end else begin
            state_q <= S_KEYLOAD;
          end
        end
        S_KEYLOAD: if (key_last_hs) state_q <= S_KIPAD;
        S_STREAM: if (blk_end_hs) begin
          last_q  <= msg_end_hs;
          state_q <= S_BSTART;
        end
        S_BSTART: begin
          first_q <= 1'b0;
          state_q <= S_BWAIT;
        end
        S_BWAIT: if (core_done) begin
          if (!last_q) begin
            state_q <= S_STREAM;
          end else begin
            case (stage_q)
              STG_NEWKEY: state_q <= S_KIPAD;
              STG_TEXT:   state_q <= reuse_q ? S_MAC : S_KOPAD;
              default:    state_q <= S_IDLE;
            endcase
          end
        end
        S_KIPAD:  state_q <= S_KIWAIT;
        S_KIWAIT: if (core_done) begin
          stage_q <= STG_TEXT;
          first_q <= 1'b1;
          last_q  <= 1'b0;
          state_q <= S_STREAM;
        end
        S_KOPAD:  state_q <= S_KOWAIT;
        S_KOWAIT: if (core_done) state_q <= S_MAC;
        S_MAC:    state_q <= S_MWAIT;
        S_MWAIT:  if (core_done) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The core is only started when the previous block has finished.
  a_one_block: assert property (@(posedge clk) disable iff (!rst_n)
    core_start |=> !core_start);

endmodule
