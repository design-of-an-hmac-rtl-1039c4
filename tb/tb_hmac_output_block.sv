// Testbench for hmac_output_block: captures random digests in each mode and
// reads them back with random read gaps; checks the number of words (7, 8, 6
// and 8 for SHA-224/256/384/512), their order (H0 first), the 32-bit masking
// and the last flag.
module tb_hmac_output_block;
  import sha2_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sha2_mode_t mode;
  logic capture, rd, out_valid, out_last;
  hash_t digest_in;
  word_t out_data;

  hmac_output_block dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    capture = 0; rd = 0; digest_in = '0; mode = SHA256;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 12; it++) begin
      hash_t d;
      int nd, n;
      bit wide;
      mode = sha2_mode_t'(it % 4);
      wide = (it % 4) >= 2;
      nd = ((it % 4) == 0) ? 7 : ((it % 4) == 2) ? 6 : 8;
      for (int i = 0; i < 8; i++) d[i] = {$urandom, $urandom};
      digest_in = d; capture = 1;
      @(negedge clk);
      capture = 0; digest_in = '0;
      n = 0;
      while (out_valid) begin
        rd = ($urandom % 2) == 0;
        if (rd) begin
          word_t e;
          e = wide ? d[n] : {32'h0, d[n][31:0]};
          checks++;
          if (out_data !== e || out_last !== (n == nd - 1)) begin
            failures++;
            $display("FAIL mode %0d word %0d got %h exp %h", mode, n, out_data, e);
          end
          n++;
        end
        @(negedge clk);
      end
      rd = 0;
      checks++;
      if (n != nd) begin
        failures++;
        $display("FAIL mode %0d read %0d words, exp %0d", mode, n, nd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
