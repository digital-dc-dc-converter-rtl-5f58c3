`timescale 1ns / 1ps
// tb_hysteretic_diff: checks the hysteretic differentiator with BETA = 64,
// STEP = 4. For a constant input the switching signal must be a 50 % square
// wave of period exactly 2 * BETA / STEP = 32 clocks and vR must stay within
// x +- BETA/2 (plus 3*STEP of slack: x moves while the comparator decides).
// For input ramps of slope r (r = -3 .. 3 LSB per clock) the duty of S measured over about 17
// periods must be (1 + r/STEP)/2 to within 3 %, i.e. the average of md
// equals the input derivative.
module tb_hysteretic_diff;
  logic clk = 0, rst_n = 0, s;
  logic signed [11:0] x = '0, md;
  logic signed [15:0] vr;
  int checks = 0, failures = 0;

  hysteretic_diff dut (.*);

  always #5 clk = ~clk;

  int hi, tot, rises, bound_err;
  int last_rise, period_min, period_max, cyc;
  bit s_q;
  always @(posedge clk) begin
    cyc++;
    tot++;
    if (s) hi++;
    if (s && !s_q) begin
      rises++;
      if (last_rise > 0) begin
        if (cyc - last_rise < period_min) period_min = cyc - last_rise;
        if (cyc - last_rise > period_max) period_max = cyc - last_rise;
      end
      last_rise = cyc;
    end
    s_q = s;
    if (rst_n && (int'(vr) - int'(x) > 32 + 12 || int'(x) - int'(vr) > 32 + 12)) bound_err++;
  end

  task automatic clear();
    hi = 0; tot = 0; rises = 0; last_rise = 0; period_min = 1 << 30; period_max = 0; bound_err = 0;
  endtask

  initial begin
    real duty, want;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // constant input
    x = 12'sd100;
    repeat (200) @(posedge clk);
    clear();
    repeat (32 * 40) @(posedge clk);
    checks += 3;
    if (period_min != 32 || period_max != 32) begin failures++; $display("period %0d..%0d", period_min, period_max); end
    duty = real'(hi) / tot;
    if (duty < 0.48 || duty > 0.52) begin failures++; $display("constant-input duty %f", duty); end
    if (bound_err != 0) begin failures++; $display("vR left the band %0d times", bound_err); end
    $display("constant input: period %0d..%0d clocks, duty %f", period_min, period_max, duty);
    // ramps
    for (int r = -3; r <= 3; r++) begin
      @(negedge clk) x = 12'(-r * 320);
      repeat (700) @(negedge clk);  // let vR reach the new start value
      for (int k = 0; k < 640; k++) begin
        @(negedge clk) x = 12'(int'(x) + r);
        if (k == 100) clear();   // let vR lock to the ramp first
      end
      duty = real'(hi) / tot;
      want = (1.0 + r / 4.0) / 2.0;
      checks += 2;
      if (duty < want - 0.03 || duty > want + 0.03) begin
        failures++; $display("slope %0d: duty %f expected %f", r, duty, want);
      end
      if (bound_err != 0) begin failures++; $display("slope %0d: vR left the band", r); end
      $display("slope %0d: duty %f (expected %f)", r, duty, want);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
