// sha2_padding_unit: SHA-2 message padding for the HMAC unit.
//
// Serial path. Between msg_start and the end of the message the unit passes
// the word stream from the input block on to the message scheduler, counting
// the message length in bits from len_offset (0 for a plain hash, B when the
// stream follows the K0 xor ipad block of an HMAC). After the last input word
// it generates the padding itself: a 1 bit (byte 0x80) right after the last
// message byte, in the same word if there is room, zero words, and the bit
// length in words 14 and 15 of the final block (64-bit length for SHA-224/256,
// 128-bit length with a zero high word for SHA-384/512). If the 0x80 byte
// lands in word 14 or 15 the length goes into a further block of zeros.
// out_blk_end marks word 15 of every block and out_msg_end the last word of
// the padded message. Handshake: valid/ready on both sides; the input is only
// taken while the output is accepted, padding words need no input.
//
// Parallel path (combinational). outer_blk is the second block of the outer
// hash of an HMAC: the L-bit inner hash held in digest_in (L/D words), the
// 0x80 word, zeros and the length B+L in word 15.
//
// The document places a padding unit next to the message scheduler and feeds
// it with the hash output and the HMAC registers; its internal organisation
// is this design's. The message length is limited to 2^64 bits for every mode
// (the size the document's property table lists).
module sha2_padding_unit
  import sha2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sha2_mode_t  mode,
  input  logic        msg_start,
  input  logic [63:0] len_offset,
  // serial input from the input block
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  input  logic        in_last,
  input  logic [3:0]  in_bytes,
  // serial output to the message scheduler
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data,
  output logic        out_blk_end,
  output logic        out_msg_end,
  // parallel padding of an inner hash
  input  hash_t       digest_in,
  output block_t      outer_blk
);

  typedef enum logic [1:0] {S_IDLE, S_DATA, S_PAD80, S_FILL} state_t;

  state_t      state_q;
  logic [3:0]  widx_q;
  logic [63:0] bitlen_q;
  logic        len_here_q;
  logic [3:0]  wb, data_bytes;
  word_t       marker, top80, len_hi, len_lo;
  logic        out_hs, short_last;

  always_comb begin
    wb     = word_bytes(mode);
    top80  = word_t'(8'h80) << (8 * (int'(wb) - 1));
    marker = word_t'(8'h80) << (8 * (int'(wb) - 1 - int'(in_bytes)));
    short_last = in_last && (in_bytes < wb);
    data_bytes = short_last ? in_bytes : wb;
    len_hi = is_wide(mode) ? '0 : {32'h0, bitlen_q[63:32]};
    len_lo = is_wide(mode) ? bitlen_q : {32'h0, bitlen_q[31:0]};

    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_data  = '0;
    case (state_q)
      S_DATA: begin
        out_valid = in_valid;
        in_ready  = out_ready;
        out_data  = short_last ? (in_data | marker) : in_data;
      end
      S_PAD80: begin
        out_valid = 1'b1;
        out_data  = top80;
      end
      S_FILL: begin
        out_valid = 1'b1;
        if (len_here_q && widx_q == 4'd14) out_data = len_hi;
        if (len_here_q && widx_q == 4'd15) out_data = len_lo;
      end
      default: ;
    endcase
    out_hs      = out_valid && out_ready;
    out_blk_end = out_valid && (widx_q == 4'd15);
    out_msg_end = out_blk_end && (state_q == S_FILL) && len_here_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      widx_q     <= '0;
      bitlen_q   <= '0;
      len_here_q <= 1'b0;
    end else if (msg_start) begin
      state_q    <= S_DATA;
      widx_q     <= '0;
      bitlen_q   <= len_offset;
      len_here_q <= 1'b0;
    end else if (out_hs) begin
      widx_q <= widx_q + 4'd1;
      case (state_q)
        S_DATA: begin
          bitlen_q <= bitlen_q + {57'd0, data_bytes, 3'd0};
          if (in_last) begin
            if (short_last) begin
              state_q    <= S_FILL;
              len_here_q <= (widx_q != 4'd14);
            end else begin
              state_q <= S_PAD80;
            end
          end
        end
        S_PAD80: begin
          state_q    <= S_FILL;
          len_here_q <= (widx_q != 4'd14);
        end
        S_FILL: begin
          if (widx_q == 4'd15) begin
            if (len_here_q) state_q <= S_IDLE;
            else            len_here_q <= 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  // A generated padding word stays until the scheduler takes it.
  a_pad_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready && state_q != S_DATA && !msg_start |=> out_valid && $stable(out_data));

  // Parallel padding: (K0 xor opad) is block 1, so the length is B + L.
  logic [3:0] nd;
  word_t      outer_len;
  assign nd        = digest_words(mode);
  assign outer_len = word_t'(block_bits(mode)) + word_t'(digest_bits(mode));

  always_comb begin
    outer_blk = '0;
    for (int i = 0; i < 16; i++) begin
      if (i < int'(nd))       outer_blk[i] = word_mask(mode, digest_in[i]);
      else if (i == int'(nd)) outer_blk[i] = top80;
    end
    outer_blk[15] = outer_len;
  end

endmodule
