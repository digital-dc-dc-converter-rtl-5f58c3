`timescale 1ns / 1ps
// tb_feedforward_ctrl: feeds sample pairs (i_on, i_off) and checks
// ff = -64 * ((i_on[n] - i_off[n-1]) + (i_off[n] - i_on[n])), clamped to
// +-4096, zero for the first pair and whenever `enable` is low. Steady state
// (equal valleys) must give zero; rising and falling loads give negative
// and positive terms; large steps must hit the limit.
module tb_feedforward_ctrl;
  import pfpid_pkg::*;
  logic clk = 0, rst_n = 0, i_valid = 0, enable = 1, limited;
  cur_t i_on = '0, i_off = '0;
  acc_t ff;
  int checks = 0, failures = 0, n_lim = 0, n_pos = 0, n_neg = 0, n_zero = 0;

  feedforward_ctrl dut (.*);

  always #15.625 clk = ~clk;

  initial begin
    int prev_off, a, b, r;
    bit first, r_lim;
    first = 1; prev_off = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      b = (n < 50) ? 100 : int'($urandom % 200) + 20;
      if (n % 13 == 0) b = (prev_off + 100) % 250;   // large jump
      a = b + int'($urandom % 20);
      enable = (n % 17 != 5);
      @(negedge clk);
      i_on = cur_t'(a); i_off = cur_t'(b); i_valid = 1;
      @(negedge clk) i_valid = 0;
      r = -64 * ((a - prev_off) + (b - a));
      r_lim = 0;
      if (r > 4096) begin r = 4096; r_lim = 1; end
      if (r < -4096) begin r = -4096; r_lim = 1; end
      if (first || !enable) begin r = 0; r_lim = 0; end
      first = 0;
      prev_off = b;
      checks += 2;
      if (int'(ff) != r) begin failures++; $display("n=%0d ff=%0d exp %0d", n, ff, r); end
      if (limited != r_lim) begin failures++; $display("n=%0d limited=%0b", n, limited); end
      if (r_lim) n_lim++;
      if (r > 0) n_pos++;
      if (r < 0) n_neg++;
      if (r == 0 && enable) n_zero++;
      repeat (3) @(negedge clk);
    end
    checks++;
    if (n_lim == 0 || n_pos == 0 || n_neg == 0 || n_zero == 0) failures++;
    $display("limited %0d positive %0d negative %0d zero %0d", n_lim, n_pos, n_neg, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
