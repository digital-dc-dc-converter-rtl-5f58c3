`timescale 1ns / 1ps
// ppid_iir: predictive (jerk) PID compensator of the PFPID controller.
//
// A PID controller with an extra "jerk" term, KJ times the second
// derivative of the error, discretised with the bilinear transform. Over the
// common denominator (1 - z^-1)(1 + z^-1)^2 this gives the third-order
// difference equation of the published structure:
//   y[n] = K1 u[n] + K2 u[n-1] + K3 u[n-2] + K4 u[n-3]
//          - y[n-1] + y[n-2] + y[n-3]
// with K1..K4 from pfpid_pkg::ppid_coefs. As in the published design the
// coefficient products come from look-up tables instead of multipliers:
// one table per coefficient holds K_i * u for every possible error u, built
// from constants at elaboration.
//
// Timing: on each `en` strobe the new y is computed from u and the stored
// history and registered, so `y` is valid from the next cycle on. The output
// is clamped to [Y_MIN, Y_MAX] (the DPWM range) and the clamped value is what
// enters the history; this anti-windup clamp and the coefficient values are
// choices of this implementation. `y` is in duty LSBs with COEF_FRAC
// fraction bits. `sat_hi`/`sat_lo` report that the last result was clamped.
module ppid_iir
  import pfpid_pkg::*;
#(
  parameter int signed K1    = int'(COEFS_DEF.k1),
  parameter int signed K2    = int'(COEFS_DEF.k2),
  parameter int signed K3    = int'(COEFS_DEF.k3),
  parameter int signed K4    = int'(COEFS_DEF.k4),
  parameter int signed Y_MIN = 0,
  parameter int signed Y_MAX = ((1 << DUTY_BITS) - 1) << COEF_FRAC
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  err_t u,
  output acc_t y,
  output logic sat_hi,
  output logic sat_lo
);

  localparam int NU = 1 << ERR_BITS;
  localparam int PROD_BITS = COEF_BITS + ERR_BITS;
  localparam int signed KC [4] = '{K1, K2, K3, K4};

  typedef logic signed [PROD_BITS-1:0] prod_t;

  // Coefficient look-up tables, indexed by the two's-complement error code.
  prod_t lut [4][NU];
  for (genvar k = 0; k < 4; k++) begin : g_coef
    for (genvar v = 0; v < NU; v++) begin : g_entry
      localparam int signed UVAL = (v >= NU / 2) ? v - NU : v;
      assign lut[k][v] = prod_t'(KC[k] * UVAL);
    end
  end

  err_t u_d [3];   // u[n-1], u[n-2], u[n-3]
  acc_t y_d [3];   // y[n-1], y[n-2], y[n-3] (y_d[0] is the output register)
  acc_t sum;

  always_comb begin
    sum = acc_t'(lut[0][u])
        + acc_t'(lut[1][u_d[0]])
        + acc_t'(lut[2][u_d[1]])
        + acc_t'(lut[3][u_d[2]])
        - y_d[0] + y_d[1] + y_d[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_d    <= '{default: '0};
      y_d    <= '{default: '0};
      sat_hi <= 1'b0;
      sat_lo <= 1'b0;
    end else if (en) begin
      u_d[0] <= u;
      u_d[1] <= u_d[0];
      u_d[2] <= u_d[1];
      y_d[1] <= y_d[0];
      y_d[2] <= y_d[1];
      sat_hi <= (sum > acc_t'(Y_MAX));
      sat_lo <= (sum < acc_t'(Y_MIN));
      if (sum > acc_t'(Y_MAX))      y_d[0] <= acc_t'(Y_MAX);
      else if (sum < acc_t'(Y_MIN)) y_d[0] <= acc_t'(Y_MIN);
      else                          y_d[0] <= sum;
    end
  end

  assign y = y_d[0];

endmodule
