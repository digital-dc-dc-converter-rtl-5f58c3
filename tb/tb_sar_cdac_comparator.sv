`timescale 1ns / 1ps
// tb_sar_cdac_comparator: checks the behavioural capacitor-DAC / comparator
// model. For random inputs inside and outside the window and every trial
// code, the decision after a sampling cycle must equal
// vin >= 1.15 V + code * 100 mV / 32, i.e. the comparator offset must have
// been cancelled by the auto-zero phase. It also checks that the held value
// ignores input changes after sampling.
module tb_sar_cdac_comparator;
  logic        clk = 0, sample = 0, cmp;
  logic [4:0]  trial;
  logic [31:0] vin_uv;
  int checks = 0, failures = 0;

  sar_cdac_comparator dut (.*);

  always #15.625 clk = ~clk;

  function automatic bit expect_cmp(longint v, int code);
    longint lvl = 64'd1150000 + (64'd100000 * code) / 32;
    return v >= lvl;
  endfunction

  initial begin
    longint v;
    trial = 0; vin_uv = 1_200_000;
    for (int n = 0; n < 200; n++) begin
      v = (n < 33) ? 1150000 + (100000 * n) / 32 : 1100000 + ($urandom % 200000);
      vin_uv = 32'(v);
      @(negedge clk) sample = 1;
      @(negedge clk) sample = 0;
      vin_uv = 32'(v + 40000);   // must not disturb the held value
      for (int c = 0; c < 32; c++) begin
        trial = 5'(c);
        #1;
        checks++;
        if (cmp !== expect_cmp(v, c)) begin
          failures++;
          $display("v=%0d code=%0d cmp=%0b", v, c, cmp);
        end
      end
    end
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
