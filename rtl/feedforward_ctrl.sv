`timescale 1ns / 1ps
// feedforward_ctrl: feedforward term from the inductor-current change.
//
// Every switching cycle delivers two current samples: i_on at the end of the
// on-time and i_off at the end of the off-time. The rise during the on-time
// is di_on = i_on[n] - i_off[n-1] and the fall during the off-time is
// di_off = i_off[n] - i_on[n]; their sum is the net change of inductor
// current over the cycle, zero in steady state. The term
//   ff = -KF * (di_on + di_off) / 2^KF_SHIFT
// (in duty LSBs with COEF_FRAC fraction bits) opposes that change, which damps
// the overshoot after a load step, and is clamped to +-FF_LIMIT. It is
// updated one cycle after `i_valid` and is zero while `enable` is low (PFM
// mode) and until two cycles of samples have been seen. KF, KF_SHIFT, the
// sign convention and the limit are choices of this implementation.
module feedforward_ctrl
  import pfpid_pkg::*;
#(
  parameter int KF       = 64,
  parameter int KF_SHIFT = 0,
  parameter int FF_LIMIT = 4096
) (
  input  logic clk,
  input  logic rst_n,
  input  cur_t i_on,
  input  cur_t i_off,
  input  logic i_valid,
  input  logic enable,
  output acc_t ff,
  output logic limited
);

  typedef logic signed [I_BITS+1:0] dcur_t;

  cur_t  i_off_prev;
  logic  primed;
  dcur_t di_on, di_off;
  acc_t  raw;

  assign di_on  = dcur_t'({2'b00, i_on})  - dcur_t'({2'b00, i_off_prev});
  assign di_off = dcur_t'({2'b00, i_off}) - dcur_t'({2'b00, i_on});
  assign raw    = -((acc_t'(KF) * (acc_t'(di_on) + acc_t'(di_off))) >>> KF_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_off_prev <= '0;
      primed     <= 1'b0;
      ff         <= '0;
      limited    <= 1'b0;
    end else begin
      if (!enable) begin
        ff      <= '0;
        limited <= 1'b0;
      end
      if (i_valid) begin
        i_off_prev <= i_off;
        primed     <= 1'b1;
        if (enable) begin
          limited <= 1'b0;
          if (!primed) ff <= '0;
          else if (raw > acc_t'(FF_LIMIT)) begin
            ff      <= acc_t'(FF_LIMIT);
            limited <= 1'b1;
          end else if (raw < -acc_t'(FF_LIMIT)) begin
            ff      <= -acc_t'(FF_LIMIT);
            limited <= 1'b1;
          end else ff <= raw;
        end
      end
    end
  end

endmodule
