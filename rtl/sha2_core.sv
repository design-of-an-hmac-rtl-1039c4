// sha2_core: SHA-2 hash core for SHA-224, SHA-256, SHA-384 and SHA-512.
//
// The core holds the four parts of the SHA-2 architecture: message scheduler
// (W0..W15), compressor (a..h), intermediate hash computation (H0..H7, two
// adders) and constants memory, plus an iteration counter t that drives them.
//
// Operation of one block:
//   1. W0..W15 are filled either serially, one word per cycle on w_valid/w_in
//      while the core is idle (16 cycles for a block), or in parallel with
//      blk_load in the same cycle as start.
//   2. start (idle only) is the one-cycle initialisation: a..h and H0..H7 are
//      both set from the source chosen by h_sel: the mode's initial values
//      (H_IV, new hash), the current H (H_KEEP, next block of a message) or
//      h_ext (H_EXT, a value stored by the HMAC unit). The mode is latched.
//   3. j iterations follow, one per cycle (j = 64 or 80); H is updated two
//      words at a time in the last four of them.
//   4. done pulses for one cycle; H0..H7 then hold the hash value on h_out.
// Latency: done is high j+1 clock cycles after the cycle in which start is
// sampled; ready is low from then until done.
//
// In the 32-bit modes every word uses the low 32 bits of the 64-bit datapath.
// The block division, the load modes, the one-cycle initialisation and the
// two-adder update follow the document. The single 64-bit datapath shared by
// all four modes and this command interface are this design's choices.
module sha2_core
  import sha2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  sha2_mode_t mode_in,    // mode for loads and for the next start
  // serial initialisation of W (one message word per cycle, idle only)
  input  logic       w_valid,
  input  word_t      w_in,
  // block start
  input  logic       start,
  input  h_sel_t     h_sel,
  input  hash_t      h_ext,
  input  logic       blk_load,   // with start: parallel initialisation of W
  input  block_t     blk_in,
  // status and result
  output logic       ready,      // idle: accepts words and start
  output logic       done,       // one-cycle pulse, H final
  output hash_t      h_out,      // H0..H7, read in parallel
  output sha2_mode_t mode        // mode of the hash in progress / last hash
);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t     state_q;
  logic [6:0] t_q;
  sha2_mode_t mode_q, eff_mode;
  logic       running, sched_load, last_iter, upd;
  logic [6:0] j, t_rel;
  word_t      k_t, wt, a_new, e_new;
  hash_t      iv, init_val;

  assign running  = (state_q == S_RUN);
  assign eff_mode = running ? mode_q : mode_in;
  assign j        = n_rounds(mode_q);
  assign last_iter = running && (t_q == j - 7'd1);
  assign t_rel    = t_q - (j - 7'd4);
  assign upd      = running && (t_q >= j - 7'd4);
  assign ready    = !running;
  assign sched_load = start && ready && blk_load;

  always_comb begin
    case (h_sel)
      H_KEEP:  init_val = h_out;
      H_EXT:   init_val = h_ext;
      default: init_val = iv;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      t_q     <= '0;
      mode_q  <= SHA256;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          state_q <= S_RUN;
          t_q     <= '0;
          mode_q  <= mode_in;
        end
      end else begin
        t_q <= t_q + 7'd1;
        if (last_iter) begin
          state_q <= S_IDLE;
          done    <= 1'b1;
        end
      end
    end
  end

  sha2_const_mem u_const (
    .mode (eff_mode),
    .t    (t_q),
    .k_t  (k_t),
    .iv   (iv)
  );

  sha2_msg_scheduler u_sched (
    .clk      (clk),
    .rst_n    (rst_n),
    .mode     (eff_mode),
    .shift_in (w_valid && ready),
    .din      (w_in),
    .par_load (sched_load),
    .par_in   (blk_in),
    .step     (running),
    .wt       (wt)
  );

  sha2_compressor u_comp (
    .clk      (clk),
    .rst_n    (rst_n),
    .mode     (eff_mode),
    .init     (start && ready),
    .init_val (init_val),
    .round    (running),
    .kt       (k_t),
    .wt       (wt),
    .a_new    (a_new),
    .e_new    (e_new),
    .vars     ()
  );

  sha2_ihc u_ihc (
    .clk      (clk),
    .rst_n    (rst_n),
    .mode     (eff_mode),
    .load     (start && ready),
    .load_val (init_val),
    .upd      (upd),
    .sel      (t_rel[1:0]),
    .a_new    (a_new),
    .e_new    (e_new),
    .h        (h_out)
  );

  assign mode = mode_q;

  // Words and starts are only taken while idle.
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);
  a_no_word_busy:  assert property (@(posedge clk) disable iff (!rst_n) w_valid |-> ready);
  a_not_both:      assert property (@(posedge clk) disable iff (!rst_n) !(start && w_valid));

endmodule
