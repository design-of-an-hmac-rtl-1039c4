// hmac_output_block: output register on the Msg_Digest_MAC_Out port.
//
// When a message digest or MAC is complete, capture copies H0..H7 from the
// SHA-2 core and sets the number of words to read to L/D: 7, 8, 6 and 8 for
// SHA-224, SHA-256, SHA-384 and SHA-512. The result is then read serially, one
// D-bit word per read operation, H0 first (bits [31:0] carry the word in the
// 32-bit modes). out_valid stays high while words remain; each cycle with rd
// high and out_valid high consumes one word; out_last marks the final word.
// Capturing into a separate register frees the core for the next operation
// while the host reads.
//
// The serial read of L/D words follows the document; the handshake and the
// separate output register are this design's choice.
module hmac_output_block
  import sha2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sha2_mode_t mode,
  input  logic       capture,
  input  hash_t      digest_in,
  input  logic       rd,
  output logic       out_valid,
  output word_t      out_data,
  output logic       out_last
);

  hash_t      buf_q;
  logic [3:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (capture) begin
      for (int i = 0; i < 8; i++) buf_q[i] <= word_mask(mode, digest_in[i]);
      cnt_q <= digest_words(mode);
    end else if (rd && out_valid) begin
      for (int i = 0; i < 7; i++) buf_q[i] <= buf_q[i+1];
      buf_q[7] <= '0;
      cnt_q    <= cnt_q - 4'd1;
    end
  end

  assign out_valid = (cnt_q != 4'd0);
  assign out_data  = buf_q[0];
  assign out_last  = (cnt_q == 4'd1);

endmodule
