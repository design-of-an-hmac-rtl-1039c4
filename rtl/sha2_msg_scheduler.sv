// sha2_msg_scheduler: the message scheduler W0..W15 of the SHA-2 core.
//
// Sixteen D-bit registers form a shift register. W0 always holds W_t, the
// schedule word of the current iteration. Every shift moves W(k+1) into W(k)
// and writes a new word into W15:
//   * serial initialisation (shift_in): the new word is the next message word
//     M_t from the input; 16 shifts load a block (16 clock cycles);
//   * iteration (step): the new word is W_(t+16) = s1(W14) + W9 + s0(W1) + W0,
//     the recurrence of the message schedule with the window shifted by t;
//   * parallel initialisation (par_load): all sixteen registers are written in
//     one cycle from par_in ([0] = M_0).
// Priority is par_load, then shift_in, then step. In the 32-bit modes the
// high half of every register stays zero.
//
// Serial and parallel loading follow the document; the priority order and the
// placement of the new word at W15 are this design's choice.
module sha2_msg_scheduler
  import sha2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sha2_mode_t mode,
  input  logic       shift_in,
  input  word_t      din,
  input  logic       par_load,
  input  block_t     par_in,
  input  logic       step,
  output word_t      wt        // W_t of the current iteration (register W0)
);

  block_t w_q;
  word_t  w_next;

  always_comb begin
    w_next = add_w(mode, add_w(mode, small_sigma1(mode, w_q[14]), w_q[9]),
                         add_w(mode, small_sigma0(mode, w_q[1]), w_q[0]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q <= '0;
    end else if (par_load) begin
      for (int i = 0; i < 16; i++) w_q[i] <= word_mask(mode, par_in[i]);
    end else if (shift_in || step) begin
      for (int i = 0; i < 15; i++) w_q[i] <= w_q[i+1];
      w_q[15] <= shift_in ? word_mask(mode, din) : w_next;
    end
  end

  assign wt = w_q[0];

endmodule
