// hmac_registers: key storage and stored hash values of the HMAC unit.
//
// K0 register: the pre-processed key K0 as one block of 16 D-bit words.
//   key_clr empties it; key_wr appends one key word (already byte-masked), so a
//   key of K <= B bits ends up as Key || zeros. key_from_hash writes the hash
//   of a long key (K > B): its L/D digest words followed by zeros, giving
//   K0 = Hash(Key) || zeros.
// Logical operations: k0_ipad_blk = K0 xor ipad and k0_opad_blk = K0 xor opad
//   (bytes 0x36 / 0x5c repeated over the block), ready for a parallel load of
//   the message scheduler.
// Hash registers, each captured from the core's H0..H7:
//   K0_Ipad_Hash      - chaining value after the (K0 xor ipad) block,
//   K0_Ipad_Text_Hash - the inner hash Hash((K0 xor ipad) || Text),
//   K0_Opad_Hash      - chaining value after the (K0 xor opad) block.
// keys_valid is set once both key hashes have been stored for the current key
//   (and cleared by key_clr); keys_mode is the mode they were computed in.
//   These two registers let a later MAC with the same key skip the key stages.
//
// The three hash registers and their use for key reuse follow the document.
// The separate K0 register is this design's: the document instead uses
// K0_Opad_Hash as temporary key storage, which holds only L bits.
module hmac_registers
  import sha2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sha2_mode_t mode,
  input  logic       key_clr,
  input  logic       key_wr,
  input  word_t      key_word,
  input  logic       key_from_hash,
  input  hash_t      digest_in,
  input  logic       store_ipad,
  input  logic       store_text,
  input  logic       store_opad,
  output block_t     k0_ipad_blk,
  output block_t     k0_opad_blk,
  output hash_t      k0_ipad_hash,
  output hash_t      k0_ipad_text_hash,
  output hash_t      k0_opad_hash,
  output logic       keys_valid,
  output sha2_mode_t keys_mode
);

  block_t     k0_q;
  logic [4:0] kptr_q;
  logic       ipad_ok_q, opad_ok_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k0_q              <= '0;
      kptr_q            <= '0;
      k0_ipad_hash      <= '0;
      k0_ipad_text_hash <= '0;
      k0_opad_hash      <= '0;
      ipad_ok_q         <= 1'b0;
      opad_ok_q         <= 1'b0;
      keys_mode         <= SHA256;
    end else begin
      if (key_clr) begin
        k0_q      <= '0;
        kptr_q    <= '0;
        ipad_ok_q <= 1'b0;
        opad_ok_q <= 1'b0;
      end else if (key_wr) begin
        // words beyond one block are dropped (a longer key must be hashed)
        if (!kptr_q[4]) k0_q[kptr_q[3:0]] <= word_mask(mode, key_word);
        if (!kptr_q[4]) kptr_q <= kptr_q + 5'd1;
      end else if (key_from_hash) begin
        for (int i = 0; i < 16; i++)
          k0_q[i] <= (i < int'(digest_words(mode))) ? word_mask(mode, digest_in[i % 8]) : '0;
      end
      if (store_ipad) begin
        k0_ipad_hash <= digest_in;
        ipad_ok_q    <= 1'b1;
        keys_mode    <= mode;
      end
      if (store_opad) begin
        k0_opad_hash <= digest_in;
        opad_ok_q    <= 1'b1;
      end
      if (store_text) k0_ipad_text_hash <= digest_in;
    end
  end

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      k0_ipad_blk[i] = k0_q[i] ^ pad_word(mode, 8'h36);
      k0_opad_blk[i] = k0_q[i] ^ pad_word(mode, 8'h5c);
    end
  end

  assign keys_valid = ipad_ok_q && opad_ok_q;

endmodule
