// Self-checking testbench for sha2_core.
// Hashes known messages in all four modes and compares the digests with the
// published SHA-2 values of those messages. The testbench pads the message
// itself, loads the first block serially (16 cycles) and later blocks
// alternately in parallel and serially, and checks that each block takes
// exactly j+1 cycles from start to done (1 initialisation cycle + j iterations).
// Messages: "abc" and generated strings of 100 and 200 bytes with byte
// i = (13*i + 12) mod 256.
module tb_sha2_core;
  import sha2_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sha2_mode_t mode_in;
  logic w_valid, start, blk_load, ready, done;
  word_t w_in;
  h_sel_t h_sel;
  hash_t h_ext, h_out;
  block_t blk_in;
  sha2_mode_t mode;

  sha2_core dut (.*);

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned msg[$];
  byte unsigned padded[$];

  task automatic make_msg(int kind);
    msg.delete();
    if (kind == 0) begin
      msg.push_back(8'h61); msg.push_back(8'h62); msg.push_back(8'h63);
    end else begin
      int n = (kind == 1) ? 100 : 200;
      for (int i = 0; i < n; i++) msg.push_back(8'((13*i + 12) & 255));
    end
  endtask

  // Standard SHA-2 padding, bytes: 0x80, zeros, big-endian bit length.
  task automatic pad(sha2_mode_t m);
    int bb = is_wide(m) ? 128 : 64;
    int lb = is_wide(m) ? 16 : 8;
    longint unsigned bits = 64'(msg.size()) * 8;
    padded = msg;
    padded.push_back(8'h80);
    while ((padded.size() % bb) != (bb - lb)) padded.push_back(8'h00);
    for (int i = lb - 1; i >= 0; i--) padded.push_back(i < 8 ? 8'(bits >> (8*i)) : 8'h00);
  endtask

  function automatic word_t get_word(sha2_mode_t m, int idx);
    word_t w = '0;
    int wb = is_wide(m) ? 8 : 4;
    for (int i = 0; i < wb; i++) w = (w << 8) | word_t'(padded[idx*wb + i]);
    return w;
  endfunction

  task automatic run_hash(sha2_mode_t m, int kind, logic [511:0] exp);
    int wb = is_wide(m) ? 8 : 4;
    int nblk;
    int t0, lat;
    make_msg(kind);
    pad(m);
    nblk = padded.size() / (16 * wb);
    for (int b = 0; b < nblk; b++) begin
      bit par = (b % 2) == 1;
      @(negedge clk);
      mode_in = m;
      if (!par) begin
        for (int i = 0; i < 16; i++) begin
          w_valid = 1; w_in = get_word(m, b*16 + i);
          @(negedge clk);
        end
        w_valid = 0;
      end else begin
        for (int i = 0; i < 16; i++) blk_in[i] = get_word(m, b*16 + i);
      end
      start = 1; blk_load = par; h_sel = (b == 0) ? H_IV : H_KEEP;
      t0 = cycles;
      @(negedge clk);
      start = 0; blk_load = 0;
      while (!done) @(negedge clk);
      lat = cycles - t0;
      checks++;
      if (lat != int'(n_rounds(m)) + 1) begin
        failures++;
        $display("FAIL latency mode %0d: %0d cycles", m, lat);
      end
    end
    for (int i = 0; i < int'(digest_words(m)); i++) begin
      word_t e;
      if (is_wide(m)) e = word_t'(exp >> (int'(digest_bits(m)) - 64*(i+1)));
      else            e = {32'h0, 32'(exp >> (int'(digest_bits(m)) - 32*(i+1)))};
      checks++;
      if (h_out[i] !== e) begin
        failures++;
        $display("FAIL mode %0d msg %0d H%0d got %h exp %h", m, kind, i, h_out[i], e);
      end
    end
  endtask

  initial begin
    w_valid = 0; start = 0; blk_load = 0; w_in = '0; h_sel = H_IV;
    h_ext = '0; blk_in = '0; mode_in = SHA256;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_hash(SHA224, 0, 512'h23097d223405d8228642a477bda255b32aadbce4bda0b3f7e36c9da7);
    run_hash(SHA256, 0, 512'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad);
    run_hash(SHA384, 0, 512'hcb00753f45a35e8bb5a03d699ac65007272c32ab0eded1631a8b605a43ff5bed8086072ba1e7cc2358baeca134c825a7);
    run_hash(SHA512, 0, 512'hddaf35a193617abacc417349ae20413112e6fa4e89a97ea20a9eeee64b55d39a2192992a274fc1a836ba3c23a3feebbd454d4423643ce80e2a9ac94fa54ca49f);
    run_hash(SHA224, 1, 512'h409c703fe4ef94ca72a90ca4a8510b63d771eca9e92196164ef0a8ea);
    run_hash(SHA256, 1, 512'h91954f7f099e30d8c5d5eb0d6c97be36f14ac21566027b0c0a8d9c3b8dd40248);
    run_hash(SHA384, 2, 512'hc64346e1ffeb1adfe6303b6933db273118ccc68531493033cae7cbde588a7ed4631a59c9a56336592ee4a4b721172e8f);
    run_hash(SHA512, 2, 512'hd134f232be22fafea3a69a01dfcb1ce75a4d1f2bb5366a22e289512606f2f3e1831946463820755ff2f3fd3cd6e833099c3907ce0d013b0d372757abe17482a6);
    run_hash(SHA256, 2, 512'ha5ef8c597146aec8a56fe6b91ab0997e4978bf852fa54eeb8956083cc5ac4ebb);
    // H_EXT: restart from an externally supplied chaining value equal to the
    // SHA-256 initial values; must reproduce the "abc" digest.
    h_ext = '0;
    h_ext[0] = 64'h6a09e667; h_ext[1] = 64'hbb67ae85; h_ext[2] = 64'h3c6ef372; h_ext[3] = 64'ha54ff53a;
    h_ext[4] = 64'h510e527f; h_ext[5] = 64'h9b05688c; h_ext[6] = 64'h1f83d9ab; h_ext[7] = 64'h5be0cd19;
    make_msg(0); pad(SHA256);
    @(negedge clk);
    for (int i = 0; i < 16; i++) blk_in[i] = get_word(SHA256, i);
    mode_in = SHA256; start = 1; blk_load = 1; h_sel = H_EXT;
    @(negedge clk); start = 0; blk_load = 0;
    while (!done) @(negedge clk);
    checks++;
    if (h_out[0] !== 64'hba7816bf || h_out[7] !== 64'hf20015ad) begin
      failures++;
      $display("FAIL H_EXT start: %h %h", h_out[0], h_out[7]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
