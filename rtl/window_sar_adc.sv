`timescale 1ns / 1ps
// window_sar_adc: window successive-approximation ADC that digitises the
// converter output voltage and presents the error e[n].
//
// Because the output voltage stays close to its reference except during
// transients, the ADC only covers a narrow window [VLOWER_UV, VUPPER_UV]
// around it; this keeps the capacitor voltages, and with them the power,
// small. Inputs outside the window clip to code 0 or 2^BITS-1. A conversion
// takes eight clocks (sample, hold, five bit decisions, output), giving
// 4 MS/s at 32 MHz; `valid` marks the eighth cycle.
//
// e[n] = REF_CODE - code, so e is positive when the output is below the
// reference. The window limits (1.15 V to 1.25 V around 1.2 V), REF_CODE and
// this sign are choices of this implementation. The digital sequencer is
// sar_logic; the capacitor array and auto-zero comparator are the behavioural
// model sar_cdac_comparator.
module window_sar_adc
  import pfpid_pkg::*;
#(
  parameter int unsigned VLOWER_UV = 1_150_000,
  parameter int unsigned VUPPER_UV = 1_250_000,
  parameter int          REF_CODE  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] vin_uv,
  output code_t       code,
  output err_t        e,
  output logic        valid
);

  logic  sample;
  logic  cmp;
  code_t trial;

  sar_logic u_logic (
    .clk, .rst_n, .cmp, .sample, .trial, .code, .valid
  );

  sar_cdac_comparator #(
    .BITS(ADC_BITS), .VLOWER_UV(VLOWER_UV), .VUPPER_UV(VUPPER_UV)
  ) u_cdac (
    .clk, .sample, .trial, .vin_uv, .cmp
  );

  assign e = err_t'(REF_CODE) - err_t'({1'b0, code});

endmodule
