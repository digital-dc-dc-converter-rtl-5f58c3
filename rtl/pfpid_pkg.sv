`timescale 1ns / 1ps
// pfpid_pkg: widths, types and coefficient arithmetic shared by the PFPID
// dc-dc controller. The 5-bit ADC, the eight-cycle conversion and the
// K1..K4 coefficient formulas follow the published design; every other
// width (error, duty, current code, fixed-point format) is a choice of
// this implementation and is collected here so it can be changed in one
// place.
package pfpid_pkg;

  // Window SAR ADC: five capacitor switches b1..b5, eight clocks per conversion.
  localparam int ADC_BITS    = 5;
  localparam int CONV_CYCLES = 8;
  // Error e[n] = REF_CODE - code, one bit wider than the code so it is signed.
  localparam int ERR_BITS    = ADC_BITS + 1;

  // Hybrid DPWM: 5-bit counter (32 MHz clock / 1 MHz switching) and 4-bit delay line.
  localparam int CNT_BITS    = 5;
  localparam int FINE_BITS   = 4;
  localparam int DUTY_BITS   = CNT_BITS + FINE_BITS;

  // Controller arithmetic: coefficients and outputs in duty LSBs with COEF_FRAC fraction bits.
  localparam int COEF_BITS   = 16;
  localparam int COEF_FRAC   = 8;
  localparam int ACC_BITS    = 26;

  // Current detector code width.
  localparam int I_BITS      = 8;

  typedef logic signed [ERR_BITS-1:0]  err_t;
  typedef logic        [ADC_BITS-1:0]  code_t;
  typedef logic        [DUTY_BITS-1:0] duty_t;
  typedef logic signed [ACC_BITS-1:0]  acc_t;
  typedef logic        [I_BITS-1:0]    cur_t;

  typedef enum logic { MODE_PWM = 1'b0, MODE_PFM = 1'b1 } mode_e;

  // SAR sequence: sample, hold, five bit decisions (MSB first), output.
  typedef enum logic [2:0] {
    PH_SAMPLE = 3'd0, PH_HOLD = 3'd1,
    PH_B1 = 3'd2, PH_B2 = 3'd3, PH_B3 = 3'd4, PH_B4 = 3'd5, PH_B5 = 3'd6,
    PH_OUT = 3'd7
  } sar_phase_e;

  // Tustin (bilinear) discretisation of KP + KI/s + KD*s + KJ*s^2 over the
  // common denominator (1 - z^-1)(1 + z^-1)^2. Arguments are already scaled:
  // kd2t = KD*2/T, kit2 = KI*T/2, kj4t2 = KJ*4/T^2, all in the Q.COEF_FRAC format.
  typedef struct packed {
    logic signed [COEF_BITS-1:0] k1;
    logic signed [COEF_BITS-1:0] k2;
    logic signed [COEF_BITS-1:0] k3;
    logic signed [COEF_BITS-1:0] k4;
  } coefs_t;

  function automatic coefs_t ppid_coefs(int kp, int kd2t, int kit2, int kj4t2);
    coefs_t c;
    c.k1 = COEF_BITS'( kp + kd2t +     kit2 +     kj4t2);
    c.k2 = COEF_BITS'( kp - kd2t + 3 * kit2 - 3 * kj4t2);
    c.k3 = COEF_BITS'(-kp - kd2t + 3 * kit2 + 3 * kj4t2);
    c.k4 = COEF_BITS'(-kp + kd2t +     kit2 -     kj4t2);
    return c;
  endfunction

  // Default gains (this implementation's choice): a starting point from an
  // averaged loop model of a 3.3 V -> 1.2 V buck with 1.5 uH / 20 uF and one
  // update per 1 us switching period, then adjusted in closed-loop
  // simulation: KP = 1.5, KD*2/T = 8, KI*T/2 = 1/16, KJ*4/T^2 = 1/2, in duty
  // LSBs per error LSB. K1..K4 = 2576, -2000, -2000, 1552.
  localparam int KP_DEF    = 384;
  localparam int KD2T_DEF  = 2048;
  localparam int KIT2_DEF  = 16;
  localparam int KJ4T2_DEF = 128;
  localparam coefs_t COEFS_DEF = ppid_coefs(KP_DEF, KD2T_DEF, KIT2_DEF, KJ4T2_DEF);

endpackage
