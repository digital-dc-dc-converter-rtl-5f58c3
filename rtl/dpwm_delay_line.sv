`timescale 1ns / 1ps
// dpwm_delay_line: behavioural model (not synthesizable hardware) of the
// tapped delay line of the hybrid DPWM.
//
// Tap k is the input delayed by k * TAP_NS; tap 0 is the input itself. With
// 16 taps of 1/16 of the 31.25 ns clock period the line spans one clock
// cycle and gives the DPWM four bits of resolution below the counter. Real
// delay cells vary with process, voltage and temperature; this model is
// ideal. Number of taps and tap delay are choices of this implementation.
module dpwm_delay_line #(
  parameter int  TAPS   = 16,
  parameter real TAP_NS = 1.953125
) (
  input  logic            din,
  output logic [TAPS-1:0] taps
);

  assign taps[0] = din;
  for (genvar k = 1; k < TAPS; k++) begin : g_tap
    assign #(TAP_NS * k) taps[k] = din;
  end

endmodule
