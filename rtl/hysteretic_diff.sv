`timescale 1ns / 1ps
// hysteretic_diff: discrete-time hysteretic differentiator.
//
// A differentiator with gain Kd can be built as negative feedback around an
// integrator of gain 1/Kd. Replacing the forward gain by a hysteretic
// comparator makes the loop oscillate by itself and turns the derivative of
// the input into a switching signal S: the integrator output vR ramps up
// while S = 1 and down while S = 0, and the comparator, looking at vR - x,
// switches S to 0 when vR - x reaches +BETA/2 and back to 1 when it reaches
// -BETA/2. vR therefore stays within about +-BETA/2 of x, and the average of
// the modulated output md = (2S - 1) * STEP equals the input slope.
// For a constant input S is a 50 % square wave of period 2 * BETA / STEP
// clocks (Ts = 4 * beta * Kd with STEP = 1 / (2 Kd) per clock); a ramp of r
// LSB per clock gives a duty of (1 + r / STEP) / 2 for |r| < STEP.
//
// Interface: x is sampled every clock; s, md and vr are registered. The
// comparator thresholds, the +-A output and the period relation follow the
// published analog description; the discrete-time form (one integrator step
// per clock), the widths and the reset state (S = 1, vR = 0) are choices of
// this implementation.
module hysteretic_diff #(
  parameter int X_BITS  = 12,
  parameter int VR_BITS = 16,
  parameter int BETA    = 64,
  parameter int STEP    = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [X_BITS-1:0]  x,
  output logic                      s,
  output logic signed [X_BITS-1:0]  md,
  output logic signed [VR_BITS-1:0] vr
);

  typedef logic signed [VR_BITS-1:0] vr_t;

  vr_t vr_next;
  vr_t diff;

  initial assert (VR_BITS > X_BITS && STEP > 0 && BETA > 2 * STEP)
    else $error("hysteretic_diff: bad parameters");

  // The comparator looks at the integrator value of the next clock, so S
  // turns exactly when vR - x reaches a threshold (no extra step of overshoot).
  assign md      = s ? X_BITS'(STEP) : -X_BITS'(STEP);
  assign vr_next = vr + vr_t'(md);
  assign diff    = vr_next - vr_t'(x);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s  <= 1'b1;
      vr <= '0;
    end else begin
      vr <= vr_next;
      if (s && diff >= vr_t'(BETA / 2))        s <= 1'b0;
      else if (!s && diff <= -vr_t'(BETA / 2)) s <= 1'b1;
    end
  end

endmodule
