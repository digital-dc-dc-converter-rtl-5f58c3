`timescale 1ns / 1ps
// tb_dpwm_delay_line: sends pulses of random width into the delay line and
// checks, for every tap k, that its rising and falling edges arrive
// k * 1.953125 ns after the input edges (to 2 ps).
module tb_dpwm_delay_line;
  logic        din = 0;
  logic [15:0] taps;
  realtime     t_rise, t_fall;
  realtime     tr[16], tf[16];
  int checks = 0, failures = 0;

  dpwm_delay_line dut (.din, .taps);

  for (genvar k = 0; k < 16; k++) begin : g_mon
    always @(posedge taps[k]) tr[k] = $realtime;
    always @(negedge taps[k]) tf[k] = $realtime;
  end

  initial begin
    realtime w;
    // one warm-up pulse so every tap has left its random power-up value
    #10 din = 1;
    #40 din = 0;
    #40;
    for (int n = 0; n < 20; n++) begin
      w = 31.25 + real'($urandom % 20);
      din = 1; t_rise = $realtime;
      #(w);
      din = 0; t_fall = $realtime;
      #(60.0);
      for (int k = 0; k < 16; k++) begin
        real d;
        d = 31.25 / 16.0 * k;
        checks += 2;
        if (tr[k] - t_rise - d > 0.003 || t_rise + d - tr[k] > 0.003) begin
          failures++; $display("tap %0d rise at %f, expected %f", k, tr[k], t_rise + d);
        end
        if (tf[k] - t_fall - d > 0.003 || t_fall + d - tf[k] > 0.003) begin
          failures++; $display("tap %0d fall at %f, expected %f", k, tf[k], t_fall + d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
