// Testbench for sha2_compressor: from random working variables, runs random
// sequences of iterations with random K_t and W_t in 32-bit and 64-bit modes
// and compares a..h and the a_new/e_new outputs with a reference round
// computed in the testbench.
module tb_sha2_compressor;
  import sha2_pkg::*;
  import tb_sha2_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sha2_mode_t mode;
  logic init, round;
  hash_t init_val, vars;
  word_t kt, wt, a_new, e_new;

  sha2_compressor dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] v [8];

  task automatic run(sha2_mode_t m, int n);
    bit wide = (m == SHA384 || m == SHA512);
    @(negedge clk);
    mode = m;
    for (int i = 0; i < 8; i++) begin
      v[i] = rnd(wide);
      init_val[i] = v[i];
    end
    init = 1;
    @(negedge clk);
    init = 0;
    for (int r = 0; r < n; r++) begin
      logic [63:0] t1, t2, chv, mjv;
      kt = rnd(wide); wt = rnd(wide);
      chv = (v[4] & v[5]) ^ (~v[4] & v[6]);
      mjv = (v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]);
      if (!wide) begin chv[63:32] = 0; mjv[63:32] = 0; end
      t1 = ref_add(wide, ref_add(wide, ref_add(wide, v[7], ref_S1(wide, v[4])),
                                       ref_add(wide, chv, kt)), wt);
      t2 = ref_add(wide, ref_S0(wide, v[0]), mjv);
      round = 1;
      #1;
      checks++;
      if (a_new !== ref_add(wide, t1, t2) || e_new !== ref_add(wide, v[3], t1)) begin
        failures++;
        $display("FAIL mode %0d round %0d a_new/e_new", m, r);
      end
      v[7] = v[6]; v[6] = v[5]; v[5] = v[4]; v[4] = ref_add(wide, v[3], t1);
      v[3] = v[2]; v[2] = v[1]; v[1] = v[0]; v[0] = ref_add(wide, t1, t2);
      @(negedge clk);
      round = 0;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (vars[i] !== v[i]) begin
          failures++;
          $display("FAIL mode %0d round %0d var %0d got %h exp %h", m, r, i, vars[i], v[i]);
        end
      end
    end
  endtask

  initial begin
    init = 0; round = 0; init_val = '0; kt = '0; wt = '0; mode = SHA256;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) run(sha2_mode_t'(m), 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
