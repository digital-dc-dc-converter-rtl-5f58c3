`timescale 1ns / 1ps
// tb_pid_comparison: the 500 mA step-load transient, run side by side on
// the predictive-feedforward controller and on a conventional PID.
//
// Two copies of the converter core each drive their own buck plant model
// (3.3 V in, 1.5 uH, 20 uF, 20 mOhm ESR) and see the same load: 0.5 A from
// start-up, a step to 1.0 A, and a step back to 0.5 A. The first copy runs
// with the default gains. The second has the jerk gain and the feedforward
// gain at zero, which leaves the same proportional, integral and derivative
// gains: the conventional PID. For each copy and each step the testbench
// measures the peak deviation and the settling time into 1.2 V +- 10 mV,
// sampled every clock, and prints them side by side.
//
// Checks, for both controllers: regulation before the steps, peak
// deviation within 70 mV, settling within 70 us, PWM mode after start-up
// (start-up from 0 V passes through PFM), and the configuration itself: the
// feedforward acts in the first copy and stays zero in the second. No check
// requires one controller to beat the other; the comparison is reported,
// not asserted. The band, limits and plant values are this testbench's own.
module tb_pid_comparison;
  import pfpid_pkg::*;

  logic clk = 0, rst_n = 0;
  always #15.625 clk = ~clk;

  real iload = 0.0;

  // ---------------- two converters, two plants ----------------
  logic [31:0] vuv [2];
  cur_t        isen [2];
  logic        pwm [2], pstart [2], ev [2], psat [2], fflim [2], dclamp [2], pskip [2];
  code_t       code [2];
  err_t        e [2];
  duty_t       duty [2];
  mode_e       mode [2];
  acc_t        ff [2];
  logic        hs [2];
  logic signed [11:0] hmd [2];
  logic signed [15:0] hvr [2];
  real         vout [2], il [2];

  pfpid_converter u_pfpid (
    .clk, .rst_n, .vout_uv(vuv[0]), .i_sense(isen[0]), .pwm(pwm[0]), .adc_code(code[0]),
    .period_start(pstart[0]), .e(e[0]), .e_valid(ev[0]), .duty(duty[0]), .mode(mode[0]),
    .pid_sat(psat[0]), .ff_limited(fflim[0]), .ff(ff[0]), .duty_clamped(dclamp[0]),
    .pfm_skip(pskip[0]), .hd_x(12'sd0), .hd_s(hs[0]), .hd_md(hmd[0]), .hd_vr(hvr[0])
  );

  pfpid_converter #(.KJ4T2(0), .KF(0)) u_pid (
    .clk, .rst_n, .vout_uv(vuv[1]), .i_sense(isen[1]), .pwm(pwm[1]), .adc_code(code[1]),
    .period_start(pstart[1]), .e(e[1]), .e_valid(ev[1]), .duty(duty[1]), .mode(mode[1]),
    .pid_sat(psat[1]), .ff_limited(fflim[1]), .ff(ff[1]), .duty_clamped(dclamp[1]),
    .pfm_skip(pskip[1]), .hd_x(12'sd0), .hd_s(hs[1]), .hd_md(hmd[1]), .hd_vr(hvr[1])
  );

  buck_plant u_plant0 (
    .pwm(pwm[0]), .pfm(mode[0] == MODE_PFM), .iload, .vout_uv(vuv[0]), .i_sense(isen[0]),
    .vout(vout[0]), .il(il[0])
  );

  buck_plant u_plant1 (
    .pwm(pwm[1]), .pfm(mode[1] == MODE_PFM), .iload, .vout_uv(vuv[1]), .i_sense(isen[1]),
    .vout(vout[1]), .il(il[1])
  );

  // ---------------- measurement ----------------
  localparam real VREF = 1.2, BAND = 0.010;
  int  checks = 0, failures = 0;
  int  n_ff [2] = '{0, 0};
  int  n_pfm [2] = '{0, 0};
  real vsum [2], vpk [2];
  int  nsum = 0;
  realtime t_out [2];
  int  phase = 0;  // 0 idle, 1 averaging, 2 after a step up, 3 after a step down

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 2; k++) begin
      if (ff[k] != '0) n_ff[k]++;
      if (mode[k] == MODE_PFM && $realtime > 150us) n_pfm[k]++;
      if (phase == 1) vsum[k] += vout[k];
      if (phase == 2 && vout[k] < vpk[k]) vpk[k] = vout[k];
      if (phase == 3 && vout[k] > vpk[k]) vpk[k] = vout[k];
      if (phase >= 2 && (vout[k] > VREF + BAND || vout[k] < VREF - BAND)) t_out[k] = $realtime;
    end
    if (phase == 1) nsum++;
  end

  task automatic expect_range(string what, real v, real lo, real hi);
    checks++;
    if (v < lo || v > hi) begin
      failures++;
      $display("FAIL %s = %f not in [%f, %f]", what, v, lo, hi);
    end else
      $display("ok   %s = %f", what, v);
  endtask

  // one load step: returns peak deviation (mV) and settling time (us)
  task automatic run_step(real new_load, int ph, output real dev [2], output real ts [2]);
    realtime t0;
    iload = new_load;
    t0 = $realtime;
    for (int k = 0; k < 2; k++) begin vpk[k] = VREF; t_out[k] = t0; end
    phase = ph;
    #88us;
    phase = 0;
    for (int k = 0; k < 2; k++) begin
      dev[k] = (vpk[k] - VREF) * 1.0e3;
      ts[k]  = (t_out[k] - t0) / 1000.0;
    end
  endtask

  initial begin
    real dev_up [2], ts_up [2], dev_dn [2], ts_dn [2];
    string name [2] = '{"PFPID", "PID"};
    repeat (4) @(posedge clk);
    rst_n = 1;
    iload = 0.5;
    #150us;
    for (int k = 0; k < 2; k++) vsum[k] = 0.0;
    nsum = 0;
    phase = 1;
    #20us;
    phase = 0;
    for (int k = 0; k < 2; k++)
      expect_range({name[k], " settled output at 0.5 A"}, vsum[k] / nsum, 1.185, 1.215);

    run_step(1.0, 2, dev_up, ts_up);
    run_step(0.5, 3, dev_dn, ts_dn);

    for (int k = 0; k < 2; k++) begin
      expect_range({name[k], " undershoot after +500 mA (mV)"}, dev_up[k], -70.0, 0.0);
      expect_range({name[k], " settling after +500 mA (us)"}, ts_up[k], 0.0, 70.0);
      expect_range({name[k], " overshoot after -500 mA (mV)"}, dev_dn[k], 0.0, 70.0);
      expect_range({name[k], " settling after -500 mA (us)"}, ts_dn[k], 0.0, 70.0);
      checks++;
      if (n_pfm[k] != 0) begin failures++; $display("FAIL %s entered PFM after start-up", name[k]); end
    end
    checks += 2;
    if (n_ff[0] == 0) begin failures++; $display("FAIL PFPID feedforward never acted"); end
    if (n_ff[1] != 0) begin failures++; $display("FAIL PID feedforward not zero"); end

    $display("load step  controller  peak (mV)  settling to +-10 mV (us)");
    for (int k = 0; k < 2; k++)
      $display("up 500 mA  %-10s  %8.1f  %8.1f", name[k], dev_up[k], ts_up[k]);
    for (int k = 0; k < 2; k++)
      $display("dn 500 mA  %-10s  %8.1f  %8.1f", name[k], dev_dn[k], ts_dn[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
