// Testbench for sha2_msg_scheduler: loads random blocks serially (16 shifts)
// and in parallel (one cycle), in 32-bit and 64-bit modes, then steps through
// all iterations and compares W_t on every cycle with a reference expansion
// W_t = s1(W_t-2) + W_t-7 + s0(W_t-15) + W_t-16 computed in the testbench.
module tb_sha2_msg_scheduler;
  import sha2_pkg::*;
  import tb_sha2_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sha2_mode_t mode;
  logic shift_in, par_load, step;
  word_t din, wt;
  block_t par_in;

  sha2_msg_scheduler dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] w [80];

  task automatic run(sha2_mode_t m, bit par);
    bit wide = (m == SHA384 || m == SHA512);
    int j = wide ? 80 : 64;
    for (int i = 0; i < 16; i++) w[i] = rnd(wide);
    for (int i = 16; i < j; i++)
      w[i] = ref_add(wide, ref_add(wide, ref_s1(wide, w[i-2]), w[i-7]),
                           ref_add(wide, ref_s0(wide, w[i-15]), w[i-16]));
    @(negedge clk);
    mode = m;
    if (par) begin
      for (int i = 0; i < 16; i++) par_in[i] = w[i];
      par_load = 1;
      @(negedge clk);
      par_load = 0;
    end else begin
      for (int i = 0; i < 16; i++) begin
        shift_in = 1; din = w[i];
        @(negedge clk);
      end
      shift_in = 0;
    end
    for (int t = 0; t < j; t++) begin
      checks++;
      if (wt !== w[t]) begin
        failures++;
        $display("FAIL mode %0d par %0d W%0d got %h exp %h", m, par, t, wt, w[t]);
      end
      step = 1;
      @(negedge clk);
    end
    step = 0;
  endtask

  initial begin
    shift_in = 0; par_load = 0; step = 0; din = '0; par_in = '0; mode = SHA256;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      run(sha2_mode_t'(m), 0);
      run(sha2_mode_t'(m), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
