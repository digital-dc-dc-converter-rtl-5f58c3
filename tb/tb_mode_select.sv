`timescale 1ns / 1ps
// tb_mode_select: drives switching cycles of 32 clocks with an on-time
// strobe (sometimes absent, as in a skipped PFM cycle) and an off-time
// strobe, and a current code that ramps between the samples. Checks the
// forwarded samples and the PWM/PFM decision against a reference with
// PFM below an average of 20 and PWM above 30, each for 8 periods in a row,
// and the exit from PFM after 8 periods in a row with an on-time. The load
// sweeps down and up, so both transitions, the hysteresis band and the
// pulse-run exit are exercised.
module tb_mode_select;
  import pfpid_pkg::*;
  logic  clk = 0, rst_n = 0, smp_on = 0, smp_off = 0, i_valid;
  cur_t  i_sense = '0, i_on, i_off;
  mode_e mode;
  int checks = 0, failures = 0, to_pfm = 0, to_pwm = 0, run_exit = 0;

  mode_select dut (.*);

  always #15.625 clk = ~clk;

  initial begin
    int avg, a, b, r_on, nc, np;
    bit has_on, cond;
    mode_e r_mode;
    r_mode = MODE_PWM; nc = 0; np = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      // average current profile: 60 -> 0 -> 60, then light load with
      // on-times in every period (pulse-run exit), then noisy
      if (n < 120)      avg = (n < 60) ? 60 - n : n - 60;
      else if (n < 200) avg = (n % 40 < 20) ? 5 : 40;
      else              avg = int'($urandom % 50);
      a = avg + 4;                    // peak (end of on-time)
      b = (avg >= 4) ? avg - 4 : 0;   // valley (end of off-time)
      has_on = (n < 120) ? (n % 7 != 3) : (n < 160 ? 1'b1 : ($urandom % 3 != 0));
      @(negedge clk);
      if (has_on) begin
        i_sense = cur_t'(a); smp_on = 1;
        @(negedge clk) smp_on = 0;
      end
      i_sense = cur_t'(a + 50);       // values in between must be ignored
      repeat (5) @(negedge clk);
      i_sense = cur_t'(b); smp_off = 1;
      @(negedge clk) smp_off = 0;
      r_on = has_on ? a : b;
      cond = (r_mode == MODE_PWM) ? ((r_on + b) < 40) : ((r_on + b) > 60);
      if ((cond && nc == 7) || (r_mode == MODE_PFM && has_on && np == 7)) begin
        if (r_mode == MODE_PFM && !(cond && nc == 7)) run_exit++;
        if (r_mode == MODE_PWM) to_pfm++; else to_pwm++;
        r_mode = (r_mode == MODE_PWM) ? MODE_PFM : MODE_PWM;
        nc = 0; np = 0;
      end else begin
        nc = cond ? nc + 1 : 0;
        np = (r_mode == MODE_PFM && has_on) ? np + 1 : 0;
      end
      checks += 4;
      if (!i_valid) begin failures++; $display("n=%0d no i_valid", n); end
      if (int'(i_on) != r_on)  begin failures++; $display("n=%0d i_on %0d exp %0d", n, i_on, r_on); end
      if (int'(i_off) != b)    begin failures++; $display("n=%0d i_off %0d exp %0d", n, i_off, b); end
      if (mode != r_mode)      begin failures++; $display("n=%0d mode %0d", n, mode); end
      @(negedge clk);
      checks++;
      if (i_valid) begin failures++; $display("i_valid longer than one cycle"); end
    end
    checks++;
    if (to_pfm == 0 || to_pwm == 0 || run_exit == 0) failures++;
    $display("mode changes: to PFM %0d, to PWM %0d (by pulse run %0d)", to_pfm, to_pwm, run_exit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
