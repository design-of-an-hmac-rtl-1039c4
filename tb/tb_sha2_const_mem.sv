// Testbench for sha2_const_mem: compares individual round constants and all
// initial hash values of the four modes with the FIPS 180-4 values, and checks
// the whole K table through its sum and XOR (SHA-512) and sum (SHA-256).
module tb_sha2_const_mem;
  import sha2_pkg::*;

  sha2_mode_t mode;
  logic [6:0] t;
  word_t k_t;
  hash_t iv;

  sha2_const_mem dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  localparam word_t IV224 [8] = '{64'hc1059ed8, 64'h367cd507, 64'h3070dd17, 64'hf70e5939,
                                  64'hffc00b31, 64'h68581511, 64'h64f98fa7, 64'hbefa4fa4};
  localparam word_t IV256 [8] = '{64'h6a09e667, 64'hbb67ae85, 64'h3c6ef372, 64'ha54ff53a,
                                  64'h510e527f, 64'h9b05688c, 64'h1f83d9ab, 64'h5be0cd19};
  localparam word_t IV384 [8] = '{64'hcbbb9d5dc1059ed8, 64'h629a292a367cd507, 64'h9159015a3070dd17,
                                  64'h152fecd8f70e5939, 64'h67332667ffc00b31, 64'h8eb44a8768581511,
                                  64'hdb0c2e0d64f98fa7, 64'h47b5481dbefa4fa4};
  localparam word_t IV512 [8] = '{64'h6a09e667f3bcc908, 64'hbb67ae8584caa73b, 64'h3c6ef372fe94f82b,
                                  64'ha54ff53a5f1d36f1, 64'h510e527fade682d1, 64'h9b05688c2b3e6c1f,
                                  64'h1f83d9abfb41bd6b, 64'h5be0cd19137e2179};

  initial begin
    word_t sum, x;
    mode = SHA512; t = 0;
    #1 chk("K512[0]", k_t, 64'h428a2f98d728ae22);
    t = 1;  #1 chk("K512[1]", k_t, 64'h7137449123ef65cd);
    t = 79; #1 chk("K512[79]", k_t, 64'h6c44198c4a475817);
    sum = '0; x = '0;
    for (int i = 0; i < 80; i++) begin
      t = 7'(i); #1;
      sum += k_t; x ^= k_t;
    end
    chk("sum K512", sum, 64'h9bde35dffda2dffd);
    chk("xor K512", x, 64'hd4b82f4e9d920e3b);
    mode = SHA256;
    t = 0;  #1 chk("K256[0]", k_t, 64'h428a2f98);
    t = 63; #1 chk("K256[63]", k_t, 64'hc67178f2);
    sum = '0;
    for (int i = 0; i < 64; i++) begin
      t = 7'(i); #1;
      sum += k_t;
    end
    chk("sum K256", {32'h0, sum[31:0]}, 64'h941d1755);
    mode = SHA224; t = 5; #1 chk("K224[5]", k_t, 64'h59f111f1);
    mode = SHA384; t = 5; #1 chk("K384[5]", k_t, 64'h59f111f1b605d019);
    for (int m = 0; m < 4; m++) begin
      mode = sha2_mode_t'(m); #1;
      for (int i = 0; i < 8; i++)
        case (m)
          0: chk("IV224", iv[i], IV224[i]);
          1: chk("IV256", iv[i], IV256[i]);
          2: chk("IV384", iv[i], IV384[i]);
          default: chk("IV512", iv[i], IV512[i]);
        endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
