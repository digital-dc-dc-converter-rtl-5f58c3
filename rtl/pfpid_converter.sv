`timescale 1ns / 1ps
// pfpid_converter: digital core of a dual-mode buck converter with
// predictive-feedforward PID (PFPID) control.
//
// Signal path: the window SAR ADC converts the sensed output voltage into
// the error e[n] every eight clocks; the PFPID controller turns e[n] and the
// inductor-current code i[n] into a duty command d[n]; the hybrid DPWM
// produces the gate-drive pulse, one period per 32 clocks (1 MHz at a 32 MHz
// clock), and tells the controller when the on-time and the off-time end so
// that the current can be sampled. The power transistors, gate drivers,
// output LC filter and current detector are analog and outside this module:
// `vout_uv` (the output voltage in microvolts, as the ADC sees it) and
// `i_sense` come in, `pwm` goes out. The remaining outputs expose internal
// state for monitoring. The parameters are the compensator and feedforward
// gains, passed down to the controller (defaults from pfpid_pkg).
//
// Beside the converter, and not connected to it, sits the hysteretic
// differentiator (hysteretic_diff) that the same design describes as the
// building block of hysteretic voltage-mode control; its input and outputs
// are the hd_* ports.
module pfpid_converter
  import pfpid_pkg::*;
#(
  parameter int KP    = KP_DEF,
  parameter int KD2T  = KD2T_DEF,
  parameter int KIT2  = KIT2_DEF,
  parameter int KJ4T2 = KJ4T2_DEF,
  parameter int KF    = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] vout_uv,
  input  cur_t        i_sense,
  output logic        pwm,
  output code_t       adc_code,
  output logic        period_start,
  output err_t        e,
  output logic        e_valid,
  output duty_t       duty,
  output mode_e       mode,
  output logic        pid_sat,
  output logic        ff_limited,
  output acc_t        ff,
  output logic        duty_clamped,
  output logic        pfm_skip,
  input  logic signed [11:0] hd_x,
  output logic               hd_s,
  output logic signed [11:0] hd_md,
  output logic signed [15:0] hd_vr
);

  logic  on_end;

  window_sar_adc u_adc (
    .clk, .rst_n, .vin_uv(vout_uv), .code(adc_code), .e, .valid(e_valid)
  );

  pfpid_controller #(
    .KP(KP), .KD2T(KD2T), .KIT2(KIT2), .KJ4T2(KJ4T2), .KF(KF)
  ) u_ctrl (
    .clk, .rst_n, .e, .e_valid, .i_sense,
    .smp_on(on_end), .smp_off(period_start),
    .duty, .mode, .pid_sat, .ff_limited, .ff, .duty_clamped, .pfm_skip
  );

  hybrid_dpwm u_dpwm (
    .clk, .rst_n, .duty, .pwm, .period_start, .on_end
  );

  hysteretic_diff u_hd (
    .clk, .rst_n, .x(hd_x), .s(hd_s), .md(hd_md), .vr(hd_vr)
  );

endmodule
