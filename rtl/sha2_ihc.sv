// sha2_ihc: intermediate hash computation H0..H7 of the SHA-2 core.
//
// Instead of eight adders working in one cycle, two adders are shared over the
// last four iterations of a block. In iteration j-4+s (s = 0..3) the value the
// compressor is writing into a becomes, after the remaining shifts, the final
// register d, c, b, a (for s = 0, 1, 2, 3); likewise the value written into e
// becomes the final h, g, f, e. So at step s the unit adds
//   H(3-s) += a_new   and   H(7-s) += e_new,
// i.e. H3/H7 at t = j-4, H2/H6 at t = j-3, H1/H5 at t = j-2, H0/H4 at t = j-1.
// The register pair is chosen by the 2-bit step select (the multiplexer
// between compressor and intermediate hash in the block diagram).
//
// Interface: load writes all eight registers (start of a block, from the
// initial values, the current value, or a stored HMAC value); upd with sel
// performs one of the four paired additions. The digest is read in parallel
// on h. The two-adder schedule and its t = 60..63 order are the document's.
module sha2_ihc
  import sha2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sha2_mode_t mode,
  input  logic       load,
  input  hash_t      load_val,
  input  logic       upd,
  input  logic [1:0] sel,      // s: 0 -> H3/H7 ... 3 -> H0/H4
  input  word_t      a_new,
  input  word_t      e_new,
  output hash_t      h
);

  hash_t h_q;
  logic [2:0] lo_idx, hi_idx;
  word_t sum_lo, sum_hi;

  always_comb begin
    lo_idx = 3'd3 - {1'b0, sel};
    hi_idx = 3'd7 - {1'b0, sel};
    sum_lo = add_w(mode, h_q[lo_idx], a_new);
    sum_hi = add_w(mode, h_q[hi_idx], e_new);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_q <= '0;
    end else if (load) begin
      for (int i = 0; i < 8; i++) h_q[i] <= word_mask(mode, load_val[i]);
    end else if (upd) begin
      h_q[lo_idx] <= sum_lo;
      h_q[hi_idx] <= sum_hi;
    end
  end

  assign h = h_q;

endmodule
