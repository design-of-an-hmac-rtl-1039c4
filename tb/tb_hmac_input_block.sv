// Testbench for hmac_input_block: streams random words with random valid gaps
// and random consumer stalls, in 32-bit and 64-bit modes, and checks that every
// word arrives once, in order, with the bytes past in_bytes of a last word and
// the high half in 32-bit modes cleared, and with last/bytes passed along.
module tb_hmac_input_block;
  import sha2_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sha2_mode_t mode;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  word_t in_data, out_data;
  logic [3:0] in_bytes, out_bytes;

  hmac_input_block dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { word_t d; logic l; logic [3:0] b; } item_t;
  item_t exp_q[$];
  int received = 0;

  always @(negedge clk) out_ready <= ($urandom % 3) != 0;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    item_t e;
    checks++;
    received++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected word");
    end else begin
      e = exp_q.pop_front();
      if (out_data !== e.d || out_last !== e.l || out_bytes !== e.b) begin
        failures++;
        $display("FAIL got %h %b %0d exp %h %b %0d", out_data, out_last, out_bytes, e.d, e.l, e.b);
      end
    end
  end

  initial begin
    int sent;
    sent = 0;
    in_valid = 0; in_data = '0; in_last = 0; in_bytes = 0; mode = SHA256;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      int wb;
      mode = sha2_mode_t'(m);
      wb = (m >= 2) ? 8 : 4;
      for (int i = 0; i < 200; i++) begin
        item_t e;
        word_t d;
        logic l;
        logic [3:0] b;
        d = {$urandom, $urandom};
        l = ($urandom % 4) == 0;
        b = 4'($urandom % (wb + 1));
        e.l = l;
        e.b = l ? b : 4'(wb);
        e.d = '0;
        for (int k = 0; k < wb; k++)
          if (k < int'(e.b)) e.d[8*(wb-1-k) +: 8] = d[8*(wb-1-k) +: 8];
        while (($urandom % 3) == 0) @(negedge clk);
        in_valid = 1; in_data = d; in_last = l; in_bytes = b;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        exp_q.push_back(e);
        sent++;
        @(negedge clk);
        in_valid = 0;
      end
      while (exp_q.size() != 0) @(negedge clk);
    end
    checks++;
    if (received != sent) begin
      failures++;
      $display("FAIL sent %0d received %0d", sent, received);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
