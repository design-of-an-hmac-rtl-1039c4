// Testbench for hmac_registers: writes short keys word by word (including more
// than 16 words, which must be dropped), loads K0 from a digest in every mode,
// and checks K0 xor ipad / K0 xor opad word by word against values computed in
// the testbench. Also checks that the three hash registers capture the digest
// on their own strobe only, and the keys_valid / keys_mode bookkeeping.
module tb_hmac_registers;
  import sha2_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sha2_mode_t mode, keys_mode;
  logic key_clr, key_wr, key_from_hash, store_ipad, store_text, store_opad, keys_valid;
  word_t key_word;
  hash_t digest_in, k0_ipad_hash, k0_ipad_text_hash, k0_opad_hash;
  block_t k0_ipad_blk, k0_opad_blk;

  hmac_registers dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t k0 [16];

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic check_pads(bit wide);
    word_t ip = wide ? 64'h3636363636363636 : 64'h36363636;
    word_t op = wide ? 64'h5c5c5c5c5c5c5c5c : 64'h5c5c5c5c;
    for (int i = 0; i < 16; i++) begin
      chk("ipad", k0_ipad_blk[i], k0[i] ^ ip);
      chk("opad", k0_opad_blk[i], k0[i] ^ op);
    end
  endtask

  initial begin
    key_clr = 0; key_wr = 0; key_word = '0; key_from_hash = 0; digest_in = '0;
    store_ipad = 0; store_text = 0; store_opad = 0; mode = SHA256;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 8; it++) begin
      int m, n;
      bit wide;
      m = it % 4;
      wide = m >= 2;
      mode = sha2_mode_t'(m);
      // short key of n words
      n = (it == 3) ? 18 : 1 + ($urandom % 16);
      key_clr = 1;
      @(negedge clk);
      key_clr = 0;
      for (int i = 0; i < 16; i++) k0[i] = '0;
      for (int i = 0; i < n; i++) begin
        word_t w;
        w = {$urandom, $urandom};
        if (!wide) w[63:32] = 0;
        if (i < 16) k0[i] = w;
        key_wr = 1; key_word = w;
        @(negedge clk);
      end
      key_wr = 0;
      check_pads(wide);
      chk("keys_valid after clear", 64'(keys_valid), 0);
      // key taken from a digest
      for (int i = 0; i < 8; i++) digest_in[i] = {$urandom, $urandom};
      key_from_hash = 1;
      @(negedge clk);
      key_from_hash = 0;
      for (int i = 0; i < 16; i++) begin
        int nd;
        nd = (m == 0) ? 7 : (m == 2) ? 6 : 8;
        k0[i] = (i < nd) ? (wide ? digest_in[i] : {32'h0, digest_in[i][31:0]}) : '0;
      end
      check_pads(wide);
      // stored hashes
      store_ipad = 1;
      @(negedge clk);
      store_ipad = 0;
      chk("ipad hash", k0_ipad_hash[3], digest_in[3]);
      chk("keys_valid after ipad only", 64'(keys_valid), 0);
      digest_in[5] = ~digest_in[5];
      store_text = 1;
      @(negedge clk);
      store_text = 0;
      chk("text hash", k0_ipad_text_hash[5], digest_in[5]);
      chk("ipad hash kept", k0_ipad_hash[5], ~digest_in[5]);
      digest_in[0] = ~digest_in[0];
      store_opad = 1;
      @(negedge clk);
      store_opad = 0;
      chk("opad hash", k0_opad_hash[0], digest_in[0]);
      chk("text hash kept", k0_ipad_text_hash[0], ~digest_in[0]);
      chk("keys_valid", 64'(keys_valid), 1);
      chk("keys_mode", 64'(keys_mode), 64'(m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
