`timescale 1ns / 1ps
// tb_window_sar_adc: end-to-end check of the window SAR ADC. The input is
// changed right after each result and held for the next conversion. Expected
// code = clamp(floor((vin - 1.15 V) * 32 / 100 mV), 0, 31) and e = 16 - code.
// Results must come every 8 clocks (4 MS/s at 32 MHz). Inputs below and
// above the window must clip.
module tb_window_sar_adc;
  import pfpid_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [31:0] vin_uv;
  code_t       code;
  err_t        e;
  logic        valid;
  int checks = 0, failures = 0, cyc = 0, last = -1, clip_lo = 0, clip_hi = 0;
  longint v_cur;

  window_sar_adc dut (.clk, .rst_n, .vin_uv, .code, .e, .valid);

  always #15.625 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int exp_code(longint v);
    longint c = ((v - 1150000) * 32) / 100000;
    if (v < 1150000) return 0;
    if (c > 31) return 31;
    return int'(c);
  endfunction

  initial begin
    v_cur = 1_200_000; vin_uv = 32'(v_cur);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the first conversion samples at its first cycle; skip it
    @(posedge clk iff valid);
    for (int n = 0; n < 150; n++) begin
      @(negedge clk);
      v_cur = (n < 40) ? 1120000 + 2000 * n : 1080000 + ($urandom % 240000);
      vin_uv = 32'(v_cur);
      @(posedge clk iff valid);
      #1;
      checks += 2;
      if (int'(code) != exp_code(v_cur)) begin
        failures++; $display("vin=%0d code=%0d exp=%0d", v_cur, code, exp_code(v_cur));
      end
      if (int'(e) != 16 - exp_code(v_cur)) begin
        failures++; $display("vin=%0d e=%0d", v_cur, e);
      end
      if (v_cur < 1150000) clip_lo++;
      if (v_cur >= 1250000) clip_hi++;
      if (last >= 0) begin
        checks++;
        if (cyc - last != CONV_CYCLES) begin
          failures++; $display("conversion spacing %0d", cyc - last);
        end
      end
      last = cyc;
    end
    checks++;
    if (clip_lo == 0 || clip_hi == 0) failures++;
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
