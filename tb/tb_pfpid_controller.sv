`timescale 1ns / 1ps
// tb_pfpid_controller: runs the controller with a 32-clock switching period
// (off-time end in cycle 0, on-time end in cycle 12) and an error sample every
// 8 clocks, and checks the duty command before every new error sample
// against a reference model written here: PWM/PFM choice from the average
// of the two current samples (PFM below 20, PWM above 30, each for 8
// periods in a row, or PWM after 8 periods in a row with a PFM pulse), one
// compensator update per switching period on the second error sample, the predictive
// PID difference equation with output clamp, the feedforward term
// -64 * (net current change) clamped to +-4096, the rounded and clamped sum
// in PWM mode, and pulse skipping with a 96-LSB pulse in PFM mode. The load
// sweeps from heavy to light and back, with current steps, so both modes,
// both transitions, feedforward limiting, PID clamping and PFM skips occur.
module tb_pfpid_controller;
  import pfpid_pkg::*;
  logic  clk = 0, rst_n = 0, e_valid = 0, smp_on = 0, smp_off = 0;
  err_t  e = '0;
  cur_t  i_sense = '0;
  duty_t duty;
  mode_e mode;
  logic  pid_sat, ff_limited, duty_clamped, pfm_skip;
  acc_t  ff;
  int checks = 0, failures = 0;
  int n_pfm = 0, n_pwm = 0, n_skip = 0, n_fire = 0, n_fflim = 0, n_sat = 0, n_ffnz = 0;

  pfpid_controller dut (.*);

  always #15.625 clk = ~clk;

  localparam int KP = 384, KD = 2048, KI = 16, KJ = 128;
  localparam int RK[4] = '{KP + KD + KI + KJ, KP - KD + 3*KI - 3*KJ,
                           -KP - KD + 3*KI + 3*KJ, -KP + KD + KI - KJ};

  // reference state
  longint uh[4], yh[3];
  int  r_ff, r_mode, r_on, r_off_prev, r_fire, r_nc, r_np, r_ecnt;
  bit  r_primed, r_on_seen;

  function automatic int ref_duty();
    longint s, r;
    if (r_mode == 1) return r_fire ? 96 : 0;
    s = yh[0] + r_ff;
    r = (s + 128) >>> 8;
    if (r > 511) r = 511;
    if (r < 0) r = 0;
    return int'(r);
  endfunction

  initial begin
    int cyc, per, avg, peak, valley, ev;
    longint s;
    foreach (uh[i]) uh[i] = 0;
    foreach (yh[i]) yh[i] = 0;
    r_ff = 0; r_mode = 0; r_on = 0; r_off_prev = 0; r_fire = 0;
    r_primed = 0; r_on_seen = 0; r_nc = 0; r_np = 0; r_ecnt = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (per = 0; per < 400; per++) begin
      // load profile: heavy, ramp down to light (PFM), back up, with steps
      if (per < 100)      avg = 80 + ((per / 20) % 2) * 80;
      else if (per < 200) avg = 80 - (per - 100) * 78 / 100;
      else if (per < 300) avg = 5 + (per % 7);
      else                avg = 5 + (per - 300) * 2;
      peak = avg + 6; valley = avg - 5 < 0 ? 0 : avg - 5;
      for (cyc = 0; cyc < 32; cyc++) begin
        // drive inputs for this cycle (applied at the negedge)
        smp_off = (cyc == 0);
        smp_on  = (cyc == 12) && (r_mode == 0 || r_fire);
        e_valid = (cyc % 8 == 7);
        i_sense = cur_t'(cyc == 0 ? valley : peak);
        if (e_valid) begin
          if (per < 60) ev = int'($urandom % 5) - 2;
          else if (per % 40 < 3) ev = 31;
          else if (per % 40 < 6) ev = -32;
          else ev = int'($urandom % 7) - 3;
          e = err_t'(ev);
        end
        @(posedge clk);
        // reference update, same edge
        if (smp_on) begin r_on = peak; r_on_seen = 1; end
        if (smp_off) begin
          int on_v, sum2;
          bit cond, had_on;
          had_on = r_on_seen;
          on_v = r_on_seen ? r_on : valley;
          r_on_seen = 0;
          sum2 = on_v + valley;
          cond = (r_mode == 0) ? (sum2 < 40) : (sum2 > 60);
          if ((cond && r_nc == 7) || (r_mode == 1 && had_on && r_np == 7)) begin
            r_mode = 1 - r_mode; r_nc = 0; r_np = 0;
          end else begin
            r_nc = cond ? r_nc + 1 : 0;
            r_np = (r_mode == 1 && had_on) ? r_np + 1 : 0;
          end
          // feedforward, one clock later, with the new mode
          if (r_mode == 0) begin
            if (!r_primed) r_ff = 0;
            else begin
              r_ff = -64 * ((on_v - r_off_prev) + (valley - on_v));
              if (r_ff > 4096) begin r_ff = 4096; n_fflim++; end
              if (r_ff < -4096) begin r_ff = -4096; n_fflim++; end
            end
          end else r_ff = 0;
          r_off_prev = valley;
          r_primed = 1;
        end
        if (e_valid) begin
          r_fire = (ev > 0);
          r_ecnt = (r_ecnt + 1) % 4;
          if (r_mode == 0 && r_ecnt == 2) begin
            uh[3] = uh[2]; uh[2] = uh[1]; uh[1] = uh[0]; uh[0] = ev;
            s = RK[0]*uh[0] + RK[1]*uh[1] + RK[2]*uh[2] + RK[3]*uh[3] - yh[0] + yh[1] + yh[2];
            if (s > 511*256 || s < 0) n_sat++;
            s = s > 511*256 ? 511*256 : (s < 0 ? 0 : s);
            yh[2] = yh[1]; yh[1] = yh[0]; yh[0] = s;
          end
        end
        @(negedge clk);
        smp_on = 0; smp_off = 0; e_valid = 0;
        if (cyc % 8 == 6 && per > 0) begin
          checks += 2;
          if (int'(duty) != ref_duty()) begin
            failures++; $display("per %0d cyc %0d duty %0d expected %0d mode %0d", per, cyc, duty, ref_duty(), r_mode);
          end
          if (int'(mode) != r_mode) begin failures++; $display("per %0d mode mismatch", per); end
          if (r_mode == 1) begin if (r_fire) n_fire++; else n_skip++; n_pfm++; end
          else n_pwm++;
          if (r_mode == 0 && r_ff != 0) n_ffnz++;
        end
      end
    end
    checks += 6;
    if (n_pfm == 0)   begin failures++; $display("no PFM"); end
    if (n_skip == 0)  begin failures++; $display("no PFM skip"); end
    if (n_fire == 0)  begin failures++; $display("no PFM pulse"); end
    if (n_fflim == 0) begin failures++; $display("no feedforward limit"); end
    if (n_sat == 0)   begin failures++; $display("no PID clamp"); end
    if (n_ffnz == 0)  begin failures++; $display("no feedforward term"); end
    $display("PWM %0d PFM %0d (pulse %0d skip %0d) ff-limit %0d pid-clamp %0d ff-active %0d",
             n_pwm, n_pfm, n_fire, n_skip, n_fflim, n_sat, n_ffnz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
