// hmac_sha2_top: HMAC co-processor unit built around a SHA-2 core.
//
// Computes SHA-224/256/384/512 message digests and HMAC-SHA-224/256/384/512
// message authentication codes. Key and text enter through one word-wide
// stream port, Key_Text_In; the digest or MAC leaves serially through
// Msg_Digest_MAC_Out, one D-bit word per read.
//
// Datapath: Key_Text_In -> input block -> padding unit -> (serial load) SHA-2
// core. A multiplexer in front of the core also offers three parallel-load
// blocks: K0 xor ipad and K0 xor opad from the HMAC registers, and the padded
// inner hash from the padding unit. A second multiplexer chooses the stored
// chaining value (K0_Ipad_Hash or K0_Opad_Hash) a block may start from. The
// core's H0..H7 feed the HMAC registers, the padding unit and the output block.
// hmac_ctrl sequences the stages NewKeyHash, KeyIpadHash, TextHash,
// KeyOpadHash and MACHash.
//
// Use: present a command (cmd_valid/cmd_ready). For OP_HMAC without key reuse
// stream the key first (key_bytes bytes, last word flagged), then the text;
// with key_reuse stream only the text; for OP_HASH stream the message. Every
// stream ends with a word flagged last that holds 0..D/8 bytes. When done
// pulses, read L/D words from Msg_Digest_MAC_Out.
//
// Data words are big-endian; the 32-bit modes use bits [31:0] of each word.
// Cost per block: 16 cycles of serial load (streamed blocks only) plus j+1
// cycles of initialisation and iterations.
module hmac_sha2_top
  import sha2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // command
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  hmac_cmd_t  cmd,
  // Key_Text_In
  input  logic       key_text_in_valid,
  output logic       key_text_in_ready,
  input  word_t      key_text_in,
  input  logic       key_text_in_last,
  input  logic [3:0] key_text_in_bytes,
  // Msg_Digest_MAC_Out
  output logic       msg_digest_mac_out_valid,
  input  logic       msg_digest_mac_out_rd,
  output word_t      msg_digest_mac_out,
  output logic       msg_digest_mac_out_last,
  // status
  output logic       busy,
  output logic       done
);

  sha2_mode_t mode, core_mode, keys_mode;

  // input block; words are taken only once a command has been accepted, so
  // they are masked in the command's mode
  logic       ib_valid, ib_ready, ib_last, ib_in_ready;
  word_t      ib_data;
  logic [3:0] ib_bytes;

  // padding unit
  logic        pad_start, pad_in_valid, pad_in_ready;
  logic        pad_out_valid, pad_out_ready, pad_blk_end, pad_msg_end;
  logic [63:0] pad_len_offset;
  word_t       pad_out_data;
  block_t      outer_blk;

  // controller
  logic       route_key, stream_en, core_start, core_blk_load, ext_sel;
  logic [1:0] blk_sel;
  h_sel_t     core_h_sel;
  logic       key_clr, key_from_hash, store_ipad, store_text, store_opad;
  logic       keys_valid, capture;

  // core
  logic   core_ready, core_done;
  hash_t  h_out, h_ext;
  block_t blk_in;

  // HMAC registers
  block_t k0_ipad_blk, k0_opad_blk;
  hash_t  k0_ipad_hash, k0_ipad_text_hash, k0_opad_hash;

  hmac_input_block u_in (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (mode),
    .in_valid  (key_text_in_valid && busy),
    .in_ready  (ib_in_ready),
    .in_data   (key_text_in),
    .in_last   (key_text_in_last),
    .in_bytes  (key_text_in_bytes),
    .out_valid (ib_valid),
    .out_ready (ib_ready),
    .out_data  (ib_data),
    .out_last  (ib_last),
    .out_bytes (ib_bytes)
  );

  assign key_text_in_ready = ib_in_ready && busy;

  // The input block feeds the K0 register while a short key is loaded and the
  // padding unit otherwise.
  assign ib_ready      = route_key ? 1'b1 : pad_in_ready;
  assign pad_in_valid  = ib_valid && !route_key;
  assign pad_out_ready = stream_en && core_ready;

  sha2_padding_unit u_pad (
    .clk         (clk),
    .rst_n       (rst_n),
    .mode        (mode),
    .msg_start   (pad_start),
    .len_offset  (pad_len_offset),
    .in_valid    (pad_in_valid),
    .in_ready    (pad_in_ready),
    .in_data     (ib_data),
    .in_last     (ib_last),
    .in_bytes    (ib_bytes),
    .out_valid   (pad_out_valid),
    .out_ready   (pad_out_ready),
    .out_data    (pad_out_data),
    .out_blk_end (pad_blk_end),
    .out_msg_end (pad_msg_end),
    .digest_in   (k0_ipad_text_hash),
    .outer_blk   (outer_blk)
  );

  hmac_ctrl u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .cmd_valid      (cmd_valid),
    .cmd_ready      (cmd_ready),
    .cmd            (cmd),
    .mode           (mode),
    .route_key      (route_key),
    .key_last_hs    (route_key && ib_valid && ib_last),
    .pad_start      (pad_start),
    .pad_len_offset (pad_len_offset),
    .stream_en      (stream_en),
    .blk_end_hs     (pad_out_valid && pad_out_ready && pad_blk_end),
    .msg_end_hs     (pad_out_valid && pad_out_ready && pad_msg_end),
    .core_start     (core_start),
    .core_h_sel     (core_h_sel),
    .core_blk_load  (core_blk_load),
    .blk_sel        (blk_sel),
    .ext_sel        (ext_sel),
    .core_done      (core_done),
    .key_clr        (key_clr),
    .key_from_hash  (key_from_hash),
    .store_ipad     (store_ipad),
    .store_text     (store_text),
    .store_opad     (store_opad),
    .keys_valid     (keys_valid),
    .keys_mode      (keys_mode),
    .capture        (capture),
    .done           (done),
    .busy           (busy)
  );

  // Multiplexer in front of the core: parallel-load block and stored H.
  always_comb begin
    case (blk_sel)
      2'd0:    blk_in = k0_ipad_blk;
      2'd1:    blk_in = k0_opad_blk;
      default: blk_in = outer_blk;
    endcase
    h_ext = ext_sel ? k0_opad_hash : k0_ipad_hash;
  end

  sha2_core u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .mode_in  (mode),
    .w_valid  (pad_out_valid && pad_out_ready),
    .w_in     (pad_out_data),
    .start    (core_start),
    .h_sel    (core_h_sel),
    .h_ext    (h_ext),
    .blk_load (core_blk_load),
    .blk_in   (blk_in),
    .ready    (core_ready),
    .done     (core_done),
    .h_out    (h_out),
    .mode     (core_mode)
  );

  hmac_registers u_regs (
    .clk               (clk),
    .rst_n             (rst_n),
    .mode              (mode),
    .key_clr           (key_clr),
    .key_wr            (route_key && ib_valid),
    .key_word          (ib_data),
    .key_from_hash     (key_from_hash),
    .digest_in         (h_out),
    .store_ipad        (store_ipad),
    .store_text        (store_text),
    .store_opad        (store_opad),
    .k0_ipad_blk       (k0_ipad_blk),
    .k0_opad_blk       (k0_opad_blk),
    .k0_ipad_hash      (k0_ipad_hash),
    .k0_ipad_text_hash (k0_ipad_text_hash),
    .k0_opad_hash      (k0_opad_hash),
    .keys_valid        (keys_valid),
    .keys_mode         (keys_mode)
  );

  hmac_output_block u_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (core_mode),
    .capture   (capture),
    .digest_in (h_out),
    .rd        (msg_digest_mac_out_rd),
    .out_valid (msg_digest_mac_out_valid),
    .out_data  (msg_digest_mac_out),
    .out_last  (msg_digest_mac_out_last)
  );

endmodule
