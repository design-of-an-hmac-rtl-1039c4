// Testbench for hmac_ctrl. The core, the padding unit and the key path are
// replaced by simple responders: a started block finishes a few cycles later,
// a streamed message delivers a chosen number of blocks, a short key finishes
// loading after a few cycles. The testbench records every action of the
// controller (block starts with their load and chaining-value sources, register
// strobes, padding-unit starts with their length offset, capture and done) and
// compares the sequence with the stage order of a plain hash, an HMAC with a
// short key, with a long key (NewKeyHash), with key reuse, and with a reuse
// request that cannot be honoured because the stored key is for another mode.
module tb_hmac_ctrl;
  import sha2_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cmd_valid, cmd_ready;
  hmac_cmd_t   cmd;
  sha2_mode_t  mode, keys_mode;
  logic        route_key, key_last_hs, pad_start, stream_en, blk_end_hs, msg_end_hs;
  logic [63:0] pad_len_offset;
  logic        core_start, core_blk_load, ext_sel, core_done;
  h_sel_t      core_h_sel;
  logic [1:0]  blk_sel;
  logic        key_clr, key_from_hash, store_ipad, store_text, store_opad, keys_valid;
  logic        capture, done, busy;

  hmac_ctrl dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string log_q[$];
  int    blocks_q[$];

  // action recorder (actions of one cycle in the order listed here)
  always @(posedge clk) if (rst_n) begin
    if (core_start)
      log_q.push_back($sformatf("start par=%0d blk=%0d h=%0d ext=%0d",
                                core_blk_load, core_blk_load ? blk_sel : 0, core_h_sel,
                                core_h_sel == H_EXT ? ext_sel : 0));
    if (key_clr)       log_q.push_back("key_clr");
    if (key_from_hash) log_q.push_back("key_from_hash");
    if (store_ipad)    log_q.push_back("store_ipad");
    if (store_text)    log_q.push_back("store_text");
    if (store_opad)    log_q.push_back("store_opad");
    if (pad_start)     log_q.push_back($sformatf("pad_start %0d", pad_len_offset));
    if (capture)       log_q.push_back("capture");
    if (done)          log_q.push_back("done");
  end

  // core responder: done 6 cycles after start
  int core_cnt = 0;
  always @(posedge clk) begin
    core_done <= 1'b0;
    if (core_start) core_cnt <= 6;
    else if (core_cnt == 1) begin core_cnt <= 0; core_done <= 1'b1; end
    else if (core_cnt > 1) core_cnt <= core_cnt - 1;
  end

  // padding-unit responder: a block every 3 cycles of stream_en
  int blocks_left = 0, wcnt = 0;
  always @(posedge clk) if (pad_start) begin
    blocks_left <= blocks_q.pop_front();
    wcnt <= 0;
  end else if (stream_en && blocks_left > 0) begin
    if (wcnt == 2) begin
      wcnt <= 0;
      blocks_left <= blocks_left - 1;
    end else wcnt <= wcnt + 1;
  end
  assign blk_end_hs = stream_en && blocks_left > 0 && wcnt == 2;
  assign msg_end_hs = blk_end_hs && blocks_left == 1;

  // key responder
  int kcnt = 0;
  always @(posedge clk) kcnt <= route_key ? kcnt + 1 : 0;
  assign key_last_hs = route_key && kcnt == 3;

  task automatic run(hmac_op_t op, sha2_mode_t m, bit reuse, int kbytes, string exp[$]);
    log_q.delete();
    @(negedge clk);
    cmd_valid = 1; cmd.op = op; cmd.mode = m; cmd.key_reuse = reuse; cmd.key_bytes = 16'(kbytes);
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (log_q.size() != exp.size()) begin
      failures++;
      $display("FAIL %0d actions, exp %0d", log_q.size(), exp.size());
      foreach (log_q[i]) $display("  %s", log_q[i]);
    end else begin
      foreach (exp[i]) begin
        checks++;
        if (log_q[i] != exp[i]) begin
          failures++;
          $display("FAIL action %0d: '%s' exp '%s'", i, log_q[i], exp[i]);
        end
      end
    end
  endtask

  initial begin
    cmd_valid = 0; cmd = '0; keys_valid = 0; keys_mode = SHA256;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // plain hash, 2 blocks
    blocks_q = '{2};
    run(OP_HASH, SHA256, 0, 0, '{"pad_start 0", "start par=0 blk=0 h=0 ext=0",
        "start par=0 blk=0 h=1 ext=0", "capture", "done"});
    // HMAC, short key, 1 text block
    blocks_q = '{1};
    run(OP_HMAC, SHA256, 0, 20, '{"key_clr", "start par=1 blk=0 h=0 ext=0", "store_ipad",
        "pad_start 512", "start par=0 blk=0 h=2 ext=0", "store_text",
        "start par=1 blk=1 h=0 ext=0", "store_opad", "start par=1 blk=2 h=2 ext=1",
        "capture", "done"});
    // HMAC-SHA-512, long key (2 blocks), 2 text blocks
    blocks_q = '{2, 2};
    run(OP_HMAC, SHA512, 0, 129, '{"key_clr", "pad_start 0", "start par=0 blk=0 h=0 ext=0",
        "start par=0 blk=0 h=1 ext=0", "key_from_hash", "start par=1 blk=0 h=0 ext=0",
        "store_ipad", "pad_start 1024", "start par=0 blk=0 h=2 ext=0",
        "start par=0 blk=0 h=1 ext=0", "store_text", "start par=1 blk=1 h=0 ext=0",
        "store_opad", "start par=1 blk=2 h=2 ext=1", "capture", "done"});
    // key of exactly B bits is not hashed
    blocks_q = '{1};
    run(OP_HMAC, SHA512, 0, 128, '{"key_clr", "start par=1 blk=0 h=0 ext=0", "store_ipad",
        "pad_start 1024", "start par=0 blk=0 h=2 ext=0", "store_text",
        "start par=1 blk=1 h=0 ext=0", "store_opad", "start par=1 blk=2 h=2 ext=1",
        "capture", "done"});
    // key reuse
    keys_valid = 1; keys_mode = SHA384;
    blocks_q = '{1};
    run(OP_HMAC, SHA384, 1, 0, '{"pad_start 1024", "start par=0 blk=0 h=2 ext=0", "store_text",
        "start par=1 blk=2 h=2 ext=1", "capture", "done"});
    // reuse requested, stored key is for another mode: full key stages
    blocks_q = '{1};
    run(OP_HMAC, SHA224, 1, 10, '{"key_clr", "start par=1 blk=0 h=0 ext=0", "store_ipad",
        "pad_start 512", "start par=0 blk=0 h=2 ext=0", "store_text",
        "start par=1 blk=1 h=0 ext=0", "store_opad", "start par=1 blk=2 h=2 ext=1",
        "capture", "done"});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
