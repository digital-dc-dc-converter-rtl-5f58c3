`timescale 1ns / 1ps
// sar_cdac_comparator: behavioural model (not synthesizable hardware) of the
// analog half of the window SAR ADC: the sampling switches, the binary
// capacitor array C, C/2 ... C/16 plus a C/16 terminating capacitor, and the
// internally auto-zeroed latched comparator.
//
// The capacitor array only spans the window [VLOWER_UV, VUPPER_UV] around the
// reference, so a trial code k corresponds to the level
// VLOWER_UV + k * (VUPPER_UV - VLOWER_UV) / 2^BITS. The input is held at the
// clock edge that ends the sampling cycle. The comparator has an input offset
// OFFSET_UV; during the sampling cycle the auto-zero phase stores it, and the
// stored value is subtracted from every later decision, so a settled model
// decides as an ideal comparator would. `cmp` = 1 when the held input is at
// or above the level of `trial`. Voltages are carried as unsigned integers in
// microvolts. The window limits and the offset are assumptions of this model.
module sar_cdac_comparator #(
  parameter int          BITS      = 5,
  parameter int unsigned VLOWER_UV = 1_150_000,
  parameter int unsigned VUPPER_UV = 1_250_000,
  parameter int          OFFSET_UV = 7_000
) (
  input  logic            clk,
  input  logic            sample,
  input  logic [BITS-1:0] trial,
  input  logic [31:0]     vin_uv,
  output logic            cmp
);

  localparam longint STEP_UV = longint'(VUPPER_UV) - longint'(VLOWER_UV);

  logic [31:0] v_held;
  logic signed [31:0] az_stored;
  longint      v_dac;
  longint      v_diff;

  // Track the input and auto-zero while `sample` is high; hold afterwards.
  always_ff @(posedge clk) begin
    if (sample) begin
      v_held    <= vin_uv;
      az_stored <= OFFSET_UV;
    end
  end

  always_comb begin
    v_dac  = longint'(VLOWER_UV) + (STEP_UV * longint'(trial)) / (longint'(1) << BITS);
    v_diff = longint'(v_held) + longint'(OFFSET_UV) - longint'(az_stored) - v_dac;
    cmp    = (v_diff >= 0);
  end

endmodule
