// End-to-end testbench for hmac_sha2_top at its default parameters.
// Runs plain hashes and HMACs in all four SHA-2 modes through Key_Text_In and
// Msg_Digest_MAC_Out and compares every output word with reference values of
// the standard algorithms (FIPS 180-4 / RFC 2104) for the same data. Keys and
// texts are generated: byte i of the key is (13*i + 19) mod 256, byte i of the
// text (13*i + 26) mod 256. The host inserts random gaps in the input stream
// and in the reads. Cases cover a short key, a key of exactly B bits, long keys
// (NewKeyHash), key reuse (also across a plain hash), empty and multi-block
// texts and a text whose padding needs an extra block. Each block's latency
// (start to done, j+1 cycles) and the 16 words of every serial load are
// checked, and each mechanism is counted; one
// that never occurs counts as a failure.
module tb_hmac_sha2_top;
  import sha2_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      cmd_valid, cmd_ready;
  hmac_cmd_t cmd;
  logic      key_text_in_valid, key_text_in_ready, key_text_in_last;
  word_t     key_text_in;
  logic [3:0] key_text_in_bytes;
  logic      msg_digest_mac_out_valid, msg_digest_mac_out_rd, msg_digest_mac_out_last;
  word_t     msg_digest_mac_out;
  logic      busy, done;

  hmac_sha2_top dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- mechanism counters
  int n_stall = 0, n_serial_blk = 0, n_par_load = 0, n_newkey = 0, n_reuse = 0;
  int n_keep = 0, n_extra_pad = 0, n_pad80 = 0, n_keyload = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  int t_start = 0, cyc = 0, n_words = 0;
  always @(posedge clk) begin
    cyc++;
    if (key_text_in_valid && !key_text_in_ready && busy) n_stall++;
    if (dut.pad_out_valid && dut.pad_out_ready && dut.pad_blk_end) n_serial_blk++;
    if (dut.pad_out_valid && dut.pad_out_ready && dut.u_pad.state_q == 2'd3 &&
        dut.u_pad.widx_q == 4'd15 && !dut.u_pad.len_here_q) n_extra_pad++;
    if (dut.pad_out_valid && dut.pad_out_ready && dut.u_pad.state_q == 2'd2) n_pad80++;
    if (dut.route_key && dut.ib_valid && dut.ib_last) n_keyload++;
    if (dut.core_start && dut.core_blk_load) n_par_load++;
    if (dut.core_start && dut.core_h_sel == H_KEEP) n_keep++;
    if (dut.key_from_hash) n_newkey++;
    if (dut.store_text && dut.u_ctrl.reuse_q) n_reuse++;
    // a serially loaded block is exactly 16 shifted words
    if (dut.pad_out_valid && dut.pad_out_ready) n_words++;
    if (dut.core_start) begin
      if (!dut.core_blk_load) begin
        checks++;
        if (n_words != 16) begin
          failures++;
          $display("FAIL serial load of %0d words", n_words);
        end
      end
      n_words = 0;
      t_start = cyc;
    end
    if (rst_n && dut.core_done) begin
      checks++;
      if (cyc - t_start != int'(n_rounds(dut.core_mode)) + 1) begin
        failures++;
        $display("FAIL block latency %0d", cyc - t_start);
      end
    end
  end

  function automatic byte unsigned gen(int i, int seed);
    return 8'((13*i + 7*seed + 5) & 255);
  endfunction

  task automatic stream(int n, int seed, int wb);
    int nw = (n == 0) ? 1 : (n + wb - 1) / wb;
    for (int w = 0; w < nw; w++) begin
      word_t d = '0;
      int nb = (w == nw - 1) ? n - w*wb : wb;
      for (int b = 0; b < wb; b++)
        d = (d << 8) | ((b < nb) ? word_t'(gen(w*wb + b, seed)) : word_t'(8'($urandom)));
      while (($urandom % 4) == 0) @(negedge clk);
      key_text_in_valid = 1; key_text_in = d;
      key_text_in_last = (w == nw - 1); key_text_in_bytes = 4'(nb);
      @(posedge clk);
      while (!key_text_in_ready) @(posedge clk);
      @(negedge clk);
      key_text_in_valid = 0;
    end
  endtask

  task automatic run(hmac_op_t op, sha2_mode_t m, bit reuse, int klen, int tlen, logic [511:0] exp);
    int wb = is_wide(m) ? 8 : 4;
    int nd = int'(digest_words(m));
    int got = 0;
    @(negedge clk);
    cmd_valid = 1;
    cmd.op = op; cmd.mode = m; cmd.key_reuse = reuse; cmd.key_bytes = 16'(klen);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
    if (op == OP_HMAC && !reuse) stream(klen, 2, wb);
    stream(tlen, 3, wb);
    while (!done) @(negedge clk);
    n_mode[m]++;
    while (got < nd) begin
      msg_digest_mac_out_rd = ($urandom % 3) != 0;
      if (msg_digest_mac_out_rd) begin
        word_t e;
        if (is_wide(m)) e = word_t'(exp >> (int'(digest_bits(m)) - 64*(got+1)));
        else            e = {32'h0, 32'(exp >> (int'(digest_bits(m)) - 32*(got+1)))};
        checks++;
        if (!msg_digest_mac_out_valid || msg_digest_mac_out !== e ||
            msg_digest_mac_out_last !== (got == nd - 1)) begin
          failures++;
          $display("FAIL op %0d mode %0d word %0d got %h exp %h", op, m, got, msg_digest_mac_out, e);
        end
        got++;
      end
      @(negedge clk);
    end
    msg_digest_mac_out_rd = 0;
    checks++;
    if (msg_digest_mac_out_valid) begin
      failures++;
      $display("FAIL extra output word");
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    $display("%s: %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    cmd_valid = 0; cmd = '0; key_text_in_valid = 0; key_text_in = '0;
    key_text_in_last = 0; key_text_in_bytes = '0; msg_digest_mac_out_rd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(OP_HMAC, SHA256, 0, 20, 8,    512'h36abcb37cf004ae74fd67622abe5ec88e8d22808bad8218a86a4930ff0375303);
    run(OP_HMAC, SHA256, 1, 20, 100,  512'h0c0809c35230bdea0977a6032a498d5ccb3235ed98ebbfa47dabe2ffac9441a6);
    run(OP_HMAC, SHA256, 0, 131, 56,  512'h502b80e889d88e0f43fd9bb8c2a5e3b7afc522fc754ef48238d5cdedd39928d0);
    run(OP_HMAC, SHA224, 0, 64, 0,    512'ha839f74cd0bb01f95a585386a1cb2db4a45c750d564c6437cd5ab958);
    run(OP_HMAC, SHA384, 0, 48, 200,  512'h81739dd228f6f4f28d2fcc0d669a6047eb44fe672b2823b365ae28e31321dab7735ab7906cd3f3996775f158f3f5e75c);
    run(OP_HMAC, SHA512, 0, 200, 111, 512'h3f6e23a37a63268e3bbfa1692fcb952de2d93a19cf123356f5e3386fd80a07d887fdcbd6546d70142d85568178bf1e44d15ca2a00f4fde817adcd876a7a8a484);
    run(OP_HMAC, SHA512, 1, 200, 3,   512'h5d429bb6a9bac3b4046678951ee6b0e9685d798e18a039ab09100570839425369ffded266fd25e8971a3681e2b87591e7055bec47c263b1b8f5093430b48afde);
    run(OP_HASH, SHA256, 0, 0, 55,    512'h0223a10fb03ac642cb9e448ea0bdcf774e3382a34a49323d4c5f763059b930f6);
    run(OP_HASH, SHA512, 0, 0, 100,   512'h9afe1cdfdbbcb866dab8c0d8cf49b9acd9ada1ab2d400d7974c7a0e95de22ee82a65737414bbea2ad9e526adaac082197f66fc668e6246312f763cd80296c062);
    run(OP_HMAC, SHA224, 0, 65, 64,   512'h3edd70ea464853161f35e808ee94618d71841b00accfd7258290d676);
    run(OP_HASH, SHA384, 0, 0, 112,   512'h4ebf65cb78f90c46ad26fcb7f076fd71286ca391b9f6c84c3633655a4f9858f81d226f9475f206ecb37a3d9bd5d991f0);
    run(OP_HMAC, SHA224, 1, 65, 0,    512'h2ab546b393c3d80e6b1da6bdb5e97db50a781fca725d60d7029a9aa4);
    // single-block SHA-256 hash and HMAC-SHA-256 with a 64-byte (B-bit) key
    run(OP_HASH, SHA256, 0, 0, 3,     512'ha105d4164aed851508ff02827e7cfa503f7f0eff828afdf5d09675f488aa1346);
    run(OP_HMAC, SHA256, 0, 64, 32,   512'h7e97c9d536ec1ca9f117a92cdc6f619dc1fb879258558e3c293c3f8aef9dbaca);
    expect_seen("input stalls (Key_Text_In not ready)", n_stall);
    expect_seen("serially loaded blocks", n_serial_blk);
    expect_seen("parallel loads from HMAC registers / padding unit", n_par_load);
    expect_seen("multi-block chaining (H kept)", n_keep);
    expect_seen("NewKeyHash (long key hashed)", n_newkey);
    expect_seen("short keys loaded into K0", n_keyload);
    expect_seen("key reuse", n_reuse);
    expect_seen("extra padding block", n_extra_pad);
    expect_seen("separate 0x80 padding word", n_pad80);
    expect_seen("SHA-224 operations", n_mode[0]);
    expect_seen("SHA-256 operations", n_mode[1]);
    expect_seen("SHA-384 operations", n_mode[2]);
    expect_seen("SHA-512 operations", n_mode[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
