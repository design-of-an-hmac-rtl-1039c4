// Testbench for sha2_ihc: loads random H0..H7, applies the four paired
// updates with random a_new/e_new and checks that step s adds a_new to
// H(3-s) and e_new to H(7-s), modulo 2^32 or 2^64, and leaves the rest alone.
module tb_sha2_ihc;
  import sha2_pkg::*;
  import tb_sha2_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sha2_mode_t mode;
  logic load, upd;
  logic [1:0] sel;
  hash_t load_val, h;
  word_t a_new, e_new;

  sha2_ihc dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] e [8];

  initial begin
    load = 0; upd = 0; sel = 0; load_val = '0; a_new = '0; e_new = '0; mode = SHA256;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 16; it++) begin
      sha2_mode_t m;
      bit wide;
      m = sha2_mode_t'(it % 4);
      wide = (m == SHA384 || m == SHA512);
      mode = m;
      for (int i = 0; i < 8; i++) begin
        e[i] = rnd(wide);
        load_val[i] = e[i];
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int s = 0; s < 4; s++) begin
        a_new = rnd(wide); e_new = rnd(wide);
        sel = 2'(s); upd = 1;
        e[3-s] = ref_add(wide, e[3-s], a_new);
        e[7-s] = ref_add(wide, e[7-s], e_new);
        @(negedge clk);
        upd = 0;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (h[i] !== e[i]) begin
            failures++;
            $display("FAIL mode %0d step %0d H%0d got %h exp %h", m, s, i, h[i], e[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
