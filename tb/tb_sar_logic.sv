`timescale 1ns / 1ps
// tb_sar_logic: checks the SAR sequencer against an ideal comparator.
// The comparator is modelled here as "held value >= trial", the held value
// being a random 5-bit target captured in the sampling cycle. Every
// conversion must return the target, `valid` must come exactly every eight
// clocks and `sample` must be high exactly in the first cycle of eight.
module tb_sar_logic;
  logic       clk = 0, rst_n = 0;
  logic       cmp, sample, valid;
  logic [4:0] trial, code;
  logic [4:0] target, held;
  int checks = 0, failures = 0;
  int cyc = 0, last_valid = -1, last_sample = -1, convs = 0;

  sar_logic dut (.*);

  always #15.625 clk = ~clk;
  assign cmp = (held >= trial);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sample) held <= target;
  end

  initial begin
    target = 5'd0; held = 5'd0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      @(posedge clk);
      while (!valid) begin
        if (sample) begin
          checks++;
          if (last_sample >= 0 && cyc - last_sample != 8) begin
            failures++; $display("sample spacing %0d", cyc - last_sample);
          end
          last_sample = cyc;
        end
        @(posedge clk);
      end
      // valid is high in this cycle: check result and spacing
      checks++;
      if (code !== held) begin
        failures++; $display("code %0d expected %0d", code, held);
      end
      if (last_valid >= 0) begin
        checks++;
        if (cyc - last_valid != 8) begin
          failures++; $display("valid spacing %0d", cyc - last_valid);
        end
      end
      last_valid = cyc;
      convs++;
      target = (n < 32) ? 5'(n) : 5'($urandom);
    end
    checks++;
    if (convs != 60) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
