// hmac_input_block: input register on the Key_Text_In port.
//
// Accepts the key or text stream one D-bit word per transfer (valid/ready) and
// holds it for one stage before the padding unit or the key register. Bytes
// are packed big-endian: the first byte of the stream sits in the most
// significant byte of the D-bit word; in the 32-bit modes the word uses bits
// [31:0]. The final word of a stream is marked with in_last and carries
// in_bytes valid bytes (0..D/8; 0 lets an empty stream end). The block clears
// the unused bytes of that word and the unused high half in the 32-bit modes,
// so downstream logic can OR its padding into the word. Words that are not
// last always count as D/8 bytes.
//
// Timing: one register stage; in_ready = !full || out_ready, so a full-rate
// stream passes without bubbles while the consumer is ready.
//
// The document names an input block in front of the multiplexer; its byte
// format, handshake and masking are this design's choice.
module hmac_input_block
  import sha2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sha2_mode_t mode,
  input  logic       in_valid,
  output logic       in_ready,
  input  word_t      in_data,
  input  logic       in_last,
  input  logic [3:0] in_bytes,
  output logic       out_valid,
  input  logic       out_ready,
  output word_t      out_data,
  output logic       out_last,
  output logic [3:0] out_bytes
);

  logic [3:0] wb, nbytes;
  word_t      keep, masked;

  always_comb begin
    wb     = word_bytes(mode);
    nbytes = (in_last && in_bytes < wb) ? in_bytes : wb;
    // keep the nbytes most significant bytes of the wb-byte word
    keep   = '0;
    for (int i = 0; i < 8; i++)
      if (i < int'(nbytes)) keep[8*(int'(wb) - 1 - i) +: 8] = 8'hff;
    masked = word_mask(mode, in_data) & keep;
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
      out_bytes <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data  <= masked;
        out_last  <= in_last;
        out_bytes <= nbytes;
      end
    end
  end

  // A word offered downstream stays, unchanged, until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data) && $stable(out_last));

endmodule
