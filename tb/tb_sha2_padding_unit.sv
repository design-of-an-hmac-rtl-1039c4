// Testbench for sha2_padding_unit. Serial path: messages of many lengths
// (empty, partial last word, full last word, lengths that force an extra
// block) are streamed in every mode, with and without a B-bit length offset
// and with random stalls on both sides; the output words are compared with a
// padded message built byte by byte in the testbench, and the block-end and
// message-end flags are checked. Parallel path: the padded inner-hash block is
// compared with a reference for random digests.
module tb_sha2_padding_unit;
  import sha2_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sha2_mode_t mode;
  logic msg_start, in_valid, in_ready, in_last, out_valid, out_ready, out_blk_end, out_msg_end;
  logic [63:0] len_offset;
  word_t in_data, out_data;
  logic [3:0] in_bytes;
  hash_t digest_in;
  block_t outer_blk;

  sha2_padding_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned msg[$], pad[$];
  word_t got[$];

  // random stalls on the output side
  always @(negedge clk) out_ready <= ($urandom % 4) != 0;

  // collector
  int words_out = 0;
  bit saw_end = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    got.push_back(out_data);
    checks++;
    if (out_blk_end !== ((got.size() % 16) == 0)) begin
      failures++;
      $display("FAIL blk_end at word %0d", got.size());
    end
    if (out_msg_end) saw_end = 1;
  end

  task automatic run(sha2_mode_t m, int n, bit hmac_offset);
    int wb = (m == SHA384 || m == SHA512) ? 8 : 4;
    int bb = wb * 16;
    longint unsigned bits = 64'(n) * 8 + (hmac_offset ? 64'(bb) * 8 : 0);
    int nw = (n == 0) ? 1 : (n + wb - 1) / wb;
    msg.delete(); got.delete(); saw_end = 0;
    for (int i = 0; i < n; i++) msg.push_back(8'($urandom));
    pad = msg;
    pad.push_back(8'h80);
    while ((pad.size() % bb) != bb - 2*wb) pad.push_back(0);
    for (int i = 2*wb - 1; i >= 0; i--) pad.push_back(i < 8 ? 8'(bits >> (8*i)) : 8'h0);
    @(negedge clk);
    mode = m; len_offset = hmac_offset ? 64'(bb) * 8 : 0; msg_start = 1;
    @(negedge clk);
    msg_start = 0;
    for (int w = 0; w < nw; w++) begin
      word_t d = '0;
      int nb = (w == nw - 1) ? n - w*wb : wb;
      for (int b = 0; b < wb; b++) d = (d << 8) | {56'h0, (b < nb) ? msg[w*wb + b] : 8'h0};
      while (($urandom % 3) == 0) @(negedge clk);
      in_valid = 1; in_data = d; in_last = (w == nw - 1); in_bytes = 4'(nb);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
    end
    while (!saw_end) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (got.size() * wb != pad.size()) begin
      failures++;
      $display("FAIL mode %0d len %0d: %0d words, exp %0d", m, n, got.size(), pad.size() / wb);
    end else begin
      for (int w = 0; w < got.size(); w++) begin
        word_t e = '0;
        for (int b = 0; b < wb; b++) e = (e << 8) | word_t'(pad[w*wb + b]);
        checks++;
        if (got[w] !== e) begin
          failures++;
          $display("FAIL mode %0d len %0d word %0d got %h exp %h", m, n, w, got[w], e);
        end
      end
    end
  endtask

  int lens[15] = '{0, 1, 3, 4, 8, 55, 56, 59, 63, 64, 111, 112, 120, 127, 200};

  initial begin
    msg_start = 0; in_valid = 0; in_data = '0; in_last = 0; in_bytes = 0;
    len_offset = 0; mode = SHA256; digest_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++)
      foreach (lens[i]) run(sha2_mode_t'(m), lens[i], (i % 2) == 1);
    // parallel padding of an inner hash
    for (int m = 0; m < 4; m++) begin
      sha2_mode_t md;
      bit wide;
      int nd;
      md = sha2_mode_t'(m);
      wide = (m >= 2);
      nd = (m == 0) ? 7 : (m == 2) ? 6 : 8;
      for (int i = 0; i < 8; i++) digest_in[i] = {$urandom, $urandom};
      mode = md;
      #1;
      for (int i = 0; i < 16; i++) begin
        word_t e;
        if (i < nd)       e = wide ? digest_in[i] : {32'h0, digest_in[i][31:0]};
        else if (i == nd) e = wide ? 64'h8000_0000_0000_0000 : 64'h8000_0000;
        else if (i == 15) e = (m == 0) ? 64'd736 : (m == 1) ? 64'd768 : (m == 2) ? 64'd1408 : 64'd1536;
        else              e = '0;
        checks++;
        if (outer_blk[i] !== e) begin
          failures++;
          $display("FAIL outer block mode %0d word %0d got %h exp %h", m, i, outer_blk[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
