// sha2_compressor: the compressor of the SHA-2 core, working variables a..h.
//
// init loads a..h from init_val ([0] = a). round performs one iteration of the
// compression function with the round constant kt and schedule word wt:
//   T1 = h + S1(e) + Ch(e,f,g) + K_t + W_t,   T2 = S0(a) + Maj(a,b,c)
//   h<=g, g<=f, f<=e, e<=d+T1, d<=c, c<=b, b<=a, a<=T1+T2.
// The two values written this cycle, a_new = T1+T2 and e_new = d+T1, are also
// output: the intermediate hash computation adds them into H during the last
// four iterations. One iteration per clock cycle; all sums modulo 2^D.
//
// The round function is the document's step 3; the logical functions are
// those of the Secure Hash Standard.
module sha2_compressor
  import sha2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sha2_mode_t mode,
  input  logic       init,
  input  hash_t      init_val,
  input  logic       round,
  input  word_t      kt,
  input  word_t      wt,
  output word_t      a_new,
  output word_t      e_new,
  output hash_t      vars       // a..h, [0] = a
);

  hash_t v_q;
  word_t t1, t2;

  always_comb begin
    t1 = add_w(mode, add_w(mode, v_q[7], big_sigma1(mode, v_q[4])),
                     add_w(mode, ch(v_q[4], v_q[5], v_q[6]), add_w(mode, kt, wt)));
    t2 = add_w(mode, big_sigma0(mode, v_q[0]), maj(v_q[0], v_q[1], v_q[2]));
    a_new = add_w(mode, t1, t2);
    e_new = add_w(mode, v_q[3], t1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
    end else if (init) begin
      for (int i = 0; i < 8; i++) v_q[i] <= word_mask(mode, init_val[i]);
    end else if (round) begin
      v_q[7] <= v_q[6];
      v_q[6] <= v_q[5];
      v_q[5] <= v_q[4];
      v_q[4] <= e_new;
      v_q[3] <= v_q[2];
      v_q[2] <= v_q[1];
      v_q[1] <= v_q[0];
      v_q[0] <= a_new;
    end
  end

  assign vars = v_q;

endmodule
