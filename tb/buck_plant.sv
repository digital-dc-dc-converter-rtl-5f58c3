`timescale 1ns / 1ps
// buck_plant: behavioural model of the analog side of a synchronous buck
// converter, for closed-loop testbenches.
//
// The gate-drive pulse `pwm` switches the inductor between VIN (high) and
// ground (low). The model integrates the inductor current and the capacitor
// voltage with forward Euler every DT_NS, and adds the capacitor ESR drop
// to give the output voltage. While `pfm` is high the low-side switch opens
// at zero current (diode emulation), so the inductor current cannot go
// negative. The load is an ideal current sink, `iload` in amperes.
//
// Outputs: `vout_uv` is the output voltage in microvolts, as the ADC samples
// it. `i_sense` is the current-detector code: the inductor current in 10 mA
// steps, saturating at 0 and 2.55 A. `vout` and `il` are the same values as
// reals, for measurements. The component values are the defaults of the
// closed-loop tests; they are not part of the digital design.
module buck_plant
  import pfpid_pkg::*;
#(
  parameter real VIN   = 3.3,
  parameter real LIND  = 1.5e-6,
  parameter real CAP   = 20e-6,
  parameter real ESR   = 0.02,
  parameter real DT_NS = 0.5
) (
  input  logic        pwm,
  input  logic        pfm,
  input  real         iload,
  output logic [31:0] vout_uv,
  output cur_t        i_sense,
  output real         vout,
  output real         il
);

  real vc = 0.0;

  initial begin
    il   = 0.0;
    vout = 0.0;
  end

  always begin
    real vsw;
    #(DT_NS);
    vsw = pwm ? VIN : 0.0;
    il = il + (vsw - vout) / LIND * DT_NS * 1.0e-9;
    if (pfm && !pwm && il < 0.0) il = 0.0;
    vc = vc + (il - iload) / CAP * DT_NS * 1.0e-9;
    vout = vc + (il - iload) * ESR;
    if (vout < 0.0) vout = 0.0;
  end

  assign vout_uv = 32'(longint'(vout * 1.0e6));
  assign i_sense = (il <= 0.0) ? '0 : (il >= 2.55 ? '1 : cur_t'(int'(il * 100.0)));

endmodule
