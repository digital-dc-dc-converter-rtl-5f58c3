`timescale 1ns / 1ps
// tb_pfpid_converter: closed-loop test of the whole converter core.
//
// A synchronous buck power stage is modelled here (Vin = 3.3 V, L = 1.5 uH,
// C = 20 uF, ESR = 20 mOhm, integrated every 0.5 ns from the PWM output);
// the inductor current is allowed to fall to zero but not below while the
// controller is in PFM (the low-side switch opens at zero current), and the
// current detector reports it in 10 mA steps. The test starts from 0 V,
// settles at 500 mA, applies a 500 mA load step up and back down, drops the
// load to 50 mA (PFM) and raises it to 600 mA (back to PWM). It checks the
// regulated output in each phase, the recovery after the steps, the mode in
// each phase, the switching period and e = 16 - code, and counts every
// mechanism: ADC clipping, PID clamp, duty clamp, feedforward action and
// limit, both mode transitions, PFM pulses and skips, fine DPWM edges. A
// mechanism that never happens counts as a failure. Alongside, the
// stand-alone hysteretic differentiator gets a slow triangular input (+-1
// LSB per clock); over each half of the triangle the mean of its modulated
// output md must equal the slope (4 * (2 * duty - 1) = +-1 within 0.1), and
// its switching signal must toggle.
module tb_pfpid_converter;
  import pfpid_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [31:0] vout_uv;
  cur_t        i_sense;
  logic        pwm, period_start, e_valid;
  code_t       adc_code;
  err_t        e;
  duty_t       duty;
  mode_e       mode;
  logic        pid_sat, ff_limited, duty_clamped, pfm_skip;
  acc_t        ff;
  logic signed [11:0] hd_x = '0, hd_md;
  logic signed [15:0] hd_vr;
  logic        hd_s;

  pfpid_converter dut (.*);

  always #15.625 clk = ~clk;

  // ---------------- power stage model ----------------
  localparam real VIN = 3.3, LIND = 1.5e-6, CAP = 20e-6, ESR = 0.02, DT = 0.5e-9;
  real il = 0.0, vc = 0.0, vout = 0.0, iload = 0.0;

  always begin
    real vsw, dil;
    #0.5;
    vsw = pwm ? VIN : 0.0;
    dil = (vsw - vout) / LIND * DT;
    il = il + dil;
    if (mode == MODE_PFM && !pwm && il < 0.0) il = 0.0;
    vc = vc + (il - iload) / CAP * DT;
    vout = vc + (il - iload) * ESR;
    if (vout < 0.0) vout = 0.0;
  end
  assign vout_uv = 32'(longint'(vout * 1.0e6));
  assign i_sense = (il <= 0.0) ? '0 : (il >= 2.55 ? '1 : cur_t'(int'(il * 100.0)));

  // ---------------- checks and event counters ----------------
  int checks = 0, failures = 0;
  int n_conv = 0, n_clip = 0, n_pidsat = 0, n_dclamp = 0, n_ff = 0, n_fflim = 0;
  int n_to_pfm = 0, n_to_pwm = 0, n_pfm_pulse = 0, n_pfm_skip = 0, n_fine = 0;
  int n_periods = 0, bad_period = 0, bad_err = 0;
  mode_e mode_q = MODE_PWM;
  realtime t_ps_last = 0;

  always @(posedge clk) if (rst_n) begin
    if (e_valid) begin
      n_conv++;
      if (adc_code == '0 || adc_code == '1) n_clip++;
      if (int'(e) != 16 - int'(adc_code)) bad_err++;
      if (pid_sat) n_pidsat++;
    end
    if (duty_clamped) n_dclamp++;
    if (ff != '0) n_ff++;
    if (ff_limited) n_fflim++;
    if (mode != mode_q) begin
      if (mode == MODE_PFM) n_to_pfm++; else n_to_pwm++;
    end
    mode_q <= mode;
    if (period_start) begin
      n_periods++;
      if (t_ps_last > 0 && (($realtime - t_ps_last) > 1000.01 || ($realtime - t_ps_last) < 999.99)) bad_period++;
      t_ps_last = $realtime;
      if (mode == MODE_PFM) begin
        if (dut.u_dpwm.duty_lat != '0) n_pfm_pulse++; else n_pfm_skip++;
      end
      if (dut.u_dpwm.duty_lat[FINE_BITS-1:0] != '0) n_fine++;
    end
  end

  // hysteretic differentiator: triangle input, mean of md per half-period
  int hd_n = 0, hd_sum = 0, hd_toggles = 0, hd_halves = 0, hd_bad = 0, hd_k = 0;
  logic hd_s_q = 1'b1;
  always @(posedge clk) if (rst_n) begin
    hd_k <= (hd_k == 1599) ? 0 : hd_k + 1;
    hd_x <= (hd_k < 800) ? hd_x + 12'sd1 : hd_x - 12'sd1;
    if (hd_s != hd_s_q) hd_toggles++;
    hd_s_q <= hd_s;
    // skip the first 160 clocks of each half while vR turns around
    if (hd_k % 800 >= 160) begin hd_n++; hd_sum += int'(hd_md); end
    if (hd_k % 800 == 799) begin
      real m;
      m = real'(hd_sum) / hd_n;
      hd_halves++;
      if ($realtime > 5000 && (hd_k < 800 ? (m < 0.9 || m > 1.1) : (m < -1.1 || m > -0.9))) begin
        hd_bad++;
        $display("differentiator mean %f in half %0d", m, hd_halves);
      end
      hd_n = 0; hd_sum = 0;
    end
  end

  // optional trace, one line per switching period: +trace
  always @(posedge clk) if (rst_n && period_start && $test$plusargs("trace"))
    $display("%t vout=%f il=%f load=%f e=%0d duty=%0d mode=%s ff=%0d y=%0d", $realtime, vout, il, iload,
             e, duty, mode.name(), ff, dut.u_ctrl.y);

  // average of vout over a window, and its extremes
  task automatic measure(input realtime len, output real avg, output real vmin, output real vmax);
    real acc; int n;
    acc = 0; n = 0; vmin = 10; vmax = -10;
    repeat (int'(len / 10.0)) begin
      #10;
      acc += vout; n++;
      if (vout < vmin) vmin = vout;
      if (vout > vmax) vmax = vout;
    end
    avg = acc / n;
  endtask

  task automatic expect_near(input string what, input real v, input real lo, input real hi);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      $display("FAIL %s = %f not in [%f, %f]", what, v, lo, hi);
    end else $display("ok   %s = %f", what, v);
  endtask

  task automatic expect_mode(input string what, input mode_e m);
    checks++;
    if (mode != m) begin failures++; $display("FAIL %s: mode %s", what, mode.name()); end
  endtask

  function automatic real fabs(real x); return x < 0 ? -x : x; endfunction

  initial begin
    real avg, vmin, vmax;
    realtime t_step;
    repeat (4) @(posedge clk);
    rst_n = 1;
    iload = 0.5;
    // start-up from 0 V
    #150us;
    measure(20us, avg, vmin, vmax);
    expect_near("settled output at 500 mA", avg, 1.185, 1.215);
    expect_mode("500 mA", MODE_PWM);
    // 500 mA load step up
    iload = 1.0;
    t_step = $realtime;
    measure(10us, avg, vmin, vmax);
    expect_near("minimum after +500 mA step", vmin, 1.05, 1.2);
    #60us;
    measure(20us, avg, vmin, vmax);
    expect_near("output 70 us after +500 mA step", avg, 1.185, 1.215);
    // 500 mA load step down
    iload = 0.5;
    measure(10us, avg, vmin, vmax);
    expect_near("maximum after -500 mA step", vmax, 1.2, 1.35);
    #60us;
    measure(20us, avg, vmin, vmax);
    expect_near("output 70 us after -500 mA step", avg, 1.185, 1.215);
    // light load: PFM
    iload = 0.05;
    #150us;
    expect_mode("50 mA", MODE_PFM);
    measure(40us, avg, vmin, vmax);
    expect_near("average output in PFM at 50 mA", avg, 1.16, 1.24);
    // back to heavy load: PWM
    iload = 0.6;
    #150us;
    expect_mode("600 mA", MODE_PWM);
    measure(20us, avg, vmin, vmax);
    expect_near("output at 600 mA", avg, 1.185, 1.215);

    checks += 2;
    if (hd_bad != 0)     begin failures++; $display("FAIL differentiator mean wrong %0d times", hd_bad); end
    if (hd_toggles == 0) begin failures++; $display("FAIL differentiator never switched"); end
    $display("differentiator: %0d half-periods checked, %0d toggles", hd_halves, hd_toggles);
    checks += 3;
    if (bad_err != 0) begin failures++; $display("FAIL e != 16 - code %0d times", bad_err); end
    if (bad_period != 0) begin failures++; $display("FAIL switching period wrong %0d times", bad_period); end
    // ADC rate: 8 clocks per conversion
    if (n_conv < int'(($realtime - 200.0) / 250.0) - 2) begin failures++; $display("FAIL only %0d conversions", n_conv); end
    $display("events: conversions %0d clip %0d pid-clamp %0d duty-clamp %0d ff-active %0d ff-limit %0d",
             n_conv, n_clip, n_pidsat, n_dclamp, n_ff, n_fflim);
    $display("events: to-PFM %0d to-PWM %0d PFM-pulses %0d PFM-skips %0d fine-edges %0d periods %0d",
             n_to_pfm, n_to_pwm, n_pfm_pulse, n_pfm_skip, n_fine, n_periods);
    checks += 10;
    if (n_clip == 0)      begin failures++; $display("FAIL no ADC clipping"); end
    if (n_pidsat == 0)    begin failures++; $display("FAIL no PID clamp"); end
    if (n_dclamp == 0)    begin failures++; $display("FAIL no duty clamp"); end
    if (n_ff == 0)        begin failures++; $display("FAIL no feedforward action"); end
    if (n_fflim == 0)     begin failures++; $display("FAIL no feedforward limit"); end
    if (n_to_pfm == 0)    begin failures++; $display("FAIL no PWM->PFM"); end
    if (n_to_pwm == 0)    begin failures++; $display("FAIL no PFM->PWM"); end
    if (n_pfm_pulse == 0) begin failures++; $display("FAIL no PFM pulse"); end
    if (n_pfm_skip == 0)  begin failures++; $display("FAIL no PFM skip"); end
    if (n_fine == 0)      begin failures++; $display("FAIL no fine DPWM edge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
