`timescale 1ns / 1ps
// tb_hybrid_dpwm: for a list of duty words (all-zero, coarse-only, fine-only,
// maximum and random), measures the PWM pulse with $realtime and checks
// that it starts at the period start, lasts duty * 31.25 ns / 16 (to 5 ps),
// that the period is 32 clocks = 1000 ns (1 MHz), that duty 0 gives no
// pulse, and that `period_start` and `on_end` strobe in cycles 0 and M+1.
// The duty input changes in mid-period to show it is latched at period start.
module tb_hybrid_dpwm;
  import pfpid_pkg::*;
  logic  clk = 0, rst_n = 0, pwm, period_start, on_end;
  duty_t duty = '0;
  realtime t_rise, t_fall, t_ps, t_ps_prev;
  int    n_rise = 0, n_fall = 0;
  int    checks = 0, failures = 0, fine_used = 0;

  hybrid_dpwm dut (.*);

  always #15.625 clk = ~clk;
  always @(posedge pwm) begin t_rise = $realtime; n_rise++; end
  always @(negedge pwm) begin t_fall = $realtime; n_fall++; end

  int cyc_in_period;
  int on_end_cyc;
  always @(posedge clk) begin
    if (period_start) cyc_in_period <= 1; else cyc_in_period <= cyc_in_period + 1;
    if (on_end) on_end_cyc <= cyc_in_period;
  end

  initial begin
    int list[$];
    int d, rises0;
    list = '{0, 16, 1, 15, 17, 256, 255, 511, 496, 500, 8, 0, 100};
    repeat (20) list.push_back(int'($urandom % 512));
    repeat (3) @(posedge clk);
    rst_n = 1;
    // align: wait for a period start
    @(posedge clk iff period_start);
    foreach (list[i]) begin
      d = list[i];
      // load the duty in the middle of the current period; it applies next period
      repeat (10) @(negedge clk);
      duty = duty_t'(d);
      @(posedge clk iff period_start);   // edge after cycle 0: next period begun at last edge
      t_ps = $realtime - 31.25;          // the period started one clock earlier
      rises0 = n_rise;
      duty = duty_t'($urandom);          // mid-period changes must be ignored
      repeat (30) @(posedge clk);
      #30;                               // 998.75 ns into the period
      checks++;
      if (d == 0) begin
        if (n_rise != rises0 || pwm) begin failures++; $display("duty 0 produced a pulse"); end
      end else begin
        if (t_rise - t_ps > 0.005 || t_ps - t_rise > 0.005) begin
          failures++; $display("duty %0d rise at %f, period start %f", d, t_rise, t_ps);
        end
        checks++;
        if ((t_fall - t_rise) - d * 31.25 / 16.0 > 0.005 || d * 31.25 / 16.0 - (t_fall - t_rise) > 0.005) begin
          failures++; $display("duty %0d width %f expected %f", d, t_fall - t_rise, d * 31.25 / 16.0);
        end
        if (d % 16 != 0) fine_used++;
        if (d / 16 + 1 < 32) begin
          checks++;
          if (on_end_cyc != d / 16 + 1) begin
            failures++; $display("duty %0d on_end in cycle %0d", d, on_end_cyc);
          end
        end
      end
      if (i > 0) begin
        checks++;
        if (t_ps - t_ps_prev < 999.99 || (t_ps - t_ps_prev) / 1000.0 - $floor((t_ps - t_ps_prev) / 1000.0 + 0.5) > 1e-5) begin
          failures++; $display("period spacing %f", t_ps - t_ps_prev);
        end
      end
      t_ps_prev = t_ps;
      duty = duty_t'(list[(i + 1) % list.size()]);
    end
    checks++;
    if (fine_used == 0) failures++;
    $display("pulses with fine delay: %0d", fine_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
