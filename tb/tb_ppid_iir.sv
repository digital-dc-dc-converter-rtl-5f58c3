`timescale 1ns / 1ps
// tb_ppid_iir: checks the predictive PID difference equation against a
// reference computed here from the four gains (KP = 1.5, KD*2/T = 8,
// KI*T/2 = 1/16, KJ*4/T^2 = 1/2 in Q.8):
//   y[n] = K1 u[n] + K2 u[n-1] + K3 u[n-2] + K4 u[n-3] - y[n-1] + y[n-2] + y[n-3]
// clamped to [0, 511*256], the clamped value being stored. Samples arrive
// every 8 clocks (the ADC rate); y must be updated one clock after `en`.
// Runs of large errors drive the output into both clamps.
module tb_ppid_iir;
  import pfpid_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  err_t u = '0;
  acc_t y;
  logic sat_hi, sat_lo;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;

  ppid_iir dut (.*);

  always #15.625 clk = ~clk;

  localparam int KP = 384, KD = 2048, KI = 16, KJ = 128;
  localparam int RK1 = KP + KD + KI + KJ;
  localparam int RK2 = KP - KD + 3*KI - 3*KJ;
  localparam int RK3 = -KP - KD + 3*KI + 3*KJ;
  localparam int RK4 = -KP + KD + KI - KJ;
  localparam int YMAX = 511 * 256;

  longint uh[4], yh[4];

  initial begin
    longint s, r;
    int uv;
    foreach (uh[i]) begin uh[i] = 0; yh[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      if (n % 100 < 20)      uv = 31;                       // push to the top
      else if (n % 100 < 40) uv = -32;                      // push to the bottom
      else                   uv = int'($urandom % 9) - 4;   // small errors
      repeat (7) @(negedge clk);
      u = err_t'(uv); en = 1;
      @(negedge clk) en = 0;
      uh[3] = uh[2]; uh[2] = uh[1]; uh[1] = uh[0]; uh[0] = uv;
      s = RK1*uh[0] + RK2*uh[1] + RK3*uh[2] + RK4*uh[3] - yh[0] + yh[1] + yh[2];
      r = (s > YMAX) ? YMAX : (s < 0 ? 0 : s);
      yh[2] = yh[1]; yh[1] = yh[0]; yh[0] = r;
      checks += 2;
      if (longint'(y) != r) begin
        failures++; $display("n=%0d y=%0d expected %0d", n, y, r);
      end
      if (sat_hi != (s > YMAX) || sat_lo != (s < 0)) begin
        failures++; $display("n=%0d saturation flags wrong", n);
      end
      if (sat_hi) n_hi++;
      if (sat_lo) n_lo++;
    end
    checks++;
    if (n_hi == 0 || n_lo == 0) begin failures++; $display("a clamp never happened"); end
    $display("clamp events: high %0d low %0d", n_hi, n_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
