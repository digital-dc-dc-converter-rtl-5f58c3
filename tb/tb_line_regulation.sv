`timescale 1ns / 1ps
// tb_line_regulation: line-regulation run of the whole converter core at a
// 500 mA load, with the input voltage stepped from 1.8 V to 3.6 V in 0.2 V
// steps (the published converter was characterised over this range at this
// load). The buck power stage is modelled here as in tb_pfpid_converter
// (L = 1.5 uH, C = 20 uF, ESR = 20 mOhm). After each input step the loop is
// given 60 us to settle and the output is averaged over 20 us; every average
// must lie within 1.2 V +- 15 mV, and the whole sweep must stay within a
// 15 mV spread. The converter must remain in PWM mode throughout.
module tb_line_regulation;
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

  localparam real LIND = 1.5e-6, CAP = 20e-6, ESR = 0.02, DT = 0.5e-9;
  real vin = 1.8, il = 0.0, vc = 0.0, vout = 0.0, iload = 0.5;

  always begin
    real vsw;
    #0.5;
    vsw = pwm ? vin : 0.0;
    il = il + (vsw - vout) / LIND * DT;
    if (mode == MODE_PFM && !pwm && il < 0.0) il = 0.0;
    vc = vc + (il - iload) / CAP * DT;
    vout = vc + (il - iload) * ESR;
    if (vout < 0.0) vout = 0.0;
  end
  assign vout_uv = 32'(longint'(vout * 1.0e6));
  assign i_sense = (il <= 0.0) ? '0 : (il >= 2.55 ? '1 : cur_t'(int'(il * 100.0)));

  int checks = 0, failures = 0, n_pfm = 0;
  always @(posedge clk) if (rst_n && mode == MODE_PFM && vin > 1.85) n_pfm++;

  initial begin
    real acc, vlo, vhi, avg;
    int n;
    vlo = 10; vhi = -10;
    repeat (4) @(posedge clk);
    rst_n = 1;
    #150us;
    for (int k = 0; k <= 9; k++) begin
      vin = 1.8 + 0.2 * k;
      #60us;
      acc = 0; n = 0;
      repeat (2000) begin #10; acc += vout; n++; end
      avg = acc / n;
      $display("vin %4.2f V  vout %8.5f V  duty %0d", vin, avg, duty);
      checks++;
      if (avg < 1.185 || avg > 1.215) begin failures++; $display("FAIL output out of range"); end
      if (avg < vlo) vlo = avg;
      if (avg > vhi) vhi = avg;
    end
    checks += 2;
    if (vhi - vlo > 0.015) begin failures++; $display("FAIL spread %f", vhi - vlo); end
    if (n_pfm != 0) begin failures++; $display("FAIL left PWM mode"); end
    $display("line regulation: %f mV over 1.8..3.6 V", (vhi - vlo) * 1000.0);
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
