`timescale 1ns / 1ps
// pfpid_controller: dual-mode (PWM/PFM) predictive-feedforward PID controller.
//
// PWM mode (heavy load): the predictive PID (ppid_iir) is updated once per
// switching period, with one of the DECIM ADC samples that fall in a period
// (the one at index UPDATE_PHASE). The duty command d[n] is the PID output
// plus the feedforward term (feedforward_ctrl), rounded to whole duty LSBs
// and clamped to [0, 2^DUTY_BITS - 1]. PFM mode (light load): the PID and
// feedforward are frozen and the controller works as a pulse skipper,
// commanding a fixed pulse of PFM_DUTY in a switching period when the last
// error says the output is below the reference (e > 0) and no pulse
// otherwise, so the switching frequency falls with the load. mode_select
// picks the mode from the inductor current.
//
// Timing: `duty` is registered and follows an e[n] strobe within two clocks;
// the DPWM latches it at the start of each switching period. `smp_on` and
// `smp_off` come from the DPWM and mark the end of the on-time and of the
// off-time. The status outputs flag events for test and debug. The
// compensator gains (KP, KD2T = KD*2/T, KIT2 = KI*T/2, KJ4T2 = KJ*4/T^2, in
// Q.8 duty LSBs per error LSB) and the feedforward gain KF are parameters;
// KJ4T2 = 0 and KF = 0 turn the controller into a conventional PID.
//
// The published design names the dual-mode behaviour but not its mechanism:
// the PFM rule, PFM_DUTY and freezing the PID in PFM are choices of this
// implementation. So is the once-per-period update: the compensator has
// poles at z = -1 and rings at half its update rate; updated at the 4 MS/s
// sample rate it rang at 2 MHz, which a DPWM that takes one duty per period
// cannot act on, and the loop oscillated.
module pfpid_controller
  import pfpid_pkg::*;
#(
  parameter int PFM_DUTY     = 96,
  parameter int DECIM        = 4,
  parameter int UPDATE_PHASE = 1,
  parameter int KP           = KP_DEF,
  parameter int KD2T         = KD2T_DEF,
  parameter int KIT2         = KIT2_DEF,
  parameter int KJ4T2        = KJ4T2_DEF,
  parameter int KF           = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  err_t  e,
  input  logic  e_valid,
  input  cur_t  i_sense,
  input  logic  smp_on,
  input  logic  smp_off,
  output duty_t duty,
  output mode_e mode,
  output logic  pid_sat,
  output logic  ff_limited,
  output acc_t  ff,
  output logic  duty_clamped,
  output logic  pfm_skip
);

  localparam int DUTY_MAX = (1 << DUTY_BITS) - 1;
  localparam coefs_t COEFS = ppid_coefs(KP, KD2T, KIT2, KJ4T2);

  cur_t i_on, i_off;
  logic i_valid;
  acc_t y;
  logic sat_hi, sat_lo;
  acc_t sum, rounded;
  logic pfm_fire;
  logic pwm_mode;
  logic [$clog2(DECIM)-1:0] smp_cnt;
  logic pid_en;

  assign pwm_mode = (mode == MODE_PWM);

  mode_select u_mode (
    .clk, .rst_n, .i_sense, .smp_on, .smp_off, .i_on, .i_off, .i_valid, .mode
  );

  ppid_iir #(
    .K1(int'(COEFS.k1)), .K2(int'(COEFS.k2)), .K3(int'(COEFS.k3)), .K4(int'(COEFS.k4))
  ) u_pid (
    .clk, .rst_n, .en(pid_en), .u(e), .y, .sat_hi, .sat_lo
  );

  feedforward_ctrl #(.KF(KF)) u_ff (
    .clk, .rst_n, .i_on, .i_off, .i_valid, .enable(pwm_mode), .ff, .limited(ff_limited)
  );

  assign pid_sat = sat_hi | sat_lo;
  assign sum     = y + ff;
  assign rounded = (sum + acc_t'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;

  // One compensator update per switching period, on the error sample with
  // index UPDATE_PHASE (counted from reset) of every DECIM samples.
  assign pid_en = e_valid && pwm_mode && (int'(smp_cnt) == UPDATE_PHASE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) smp_cnt <= '0;
    else if (e_valid) smp_cnt <= (int'(smp_cnt) == DECIM - 1) ? '0 : smp_cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pfm_fire     <= 1'b0;
      duty         <= '0;
      duty_clamped <= 1'b0;
    end else begin
      if (e_valid) pfm_fire <= (e > 0);
      duty_clamped <= 1'b0;
      if (pwm_mode) begin
        if (rounded > acc_t'(DUTY_MAX)) begin
          duty         <= duty_t'(DUTY_MAX);
          duty_clamped <= 1'b1;
        end else if (rounded < 0) begin
          duty         <= '0;
          duty_clamped <= 1'b1;
        end else begin
          duty <= duty_t'(rounded);
        end
      end else begin
        duty <= pfm_fire ? duty_t'(PFM_DUTY) : '0;
      end
    end
  end

  assign pfm_skip = !pwm_mode && !pfm_fire;

endmodule
