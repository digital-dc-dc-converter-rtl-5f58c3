`timescale 1ns / 1ps
// mode_select: samples the inductor current and chooses between PWM and PFM.
//
// At heavy load the conduction loss dominates and the converter runs in
// fixed-frequency PWM; at light load it runs in PFM to save switching loss.
// The current-detector code i[n] is sampled at the end of the on-time
// (`smp_on`) and at the end of the off-time (`smp_off`, the start of the next
// switching period). The mean of the two samples stands for the average
// inductor current of the cycle. In a cycle without an on-time (a skipped
// PFM cycle) the on-time sample is replaced by the off-time sample.
//
// Mode rules, evaluated once per switching period at `smp_off`:
//   PWM -> PFM  when the average is below I_PFM_TH for HOLD periods in a row;
//   PFM -> PWM  when the average is above I_PWM_TH for HOLD periods in a row,
//               or when HOLD periods in a row all had an on-time (the PFM
//               pulses no longer keep up with the load).
// The two thresholds form a hysteresis band and the HOLD count keeps a
// transient from toggling the mode.
//
// `i_on`, `i_off` and the one-cycle `i_valid` strobe carry the cycle's samples
// on to the feedforward block; `mode` changes in the cycle after `smp_off`.
// Thresholds, averaging, the HOLD filter, the pulse-run exit from PFM and
// PWM after reset are choices of this implementation: the published design
// states only that PWM serves heavy and PFM light loads.
module mode_select
  import pfpid_pkg::*;
#(
  parameter int I_PFM_TH = 20,
  parameter int I_PWM_TH = 30,
  parameter int HOLD     = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cur_t  i_sense,
  input  logic  smp_on,
  input  logic  smp_off,
  output cur_t  i_on,
  output cur_t  i_off,
  output logic  i_valid,
  output mode_e mode
);

  localparam int HB = $clog2(HOLD + 1);

  cur_t            on_hold;
  logic            on_seen;
  logic            had_on;
  cur_t            on_use;
  logic [I_BITS:0] avg2;      // i_on + i_off, i.e. twice the average
  logic [HB-1:0]   n_cond;    // consecutive periods meeting the current rule
  logic [HB-1:0]   n_pulse;   // consecutive PFM periods with an on-time
  logic            cond;

  initial assert (I_PWM_TH >= I_PFM_TH) else $error("mode_select: thresholds reversed");

  assign had_on = smp_on || on_seen;
  assign on_use = smp_on ? i_sense : (on_seen ? on_hold : i_sense);
  assign avg2   = {1'b0, on_use} + {1'b0, i_sense};
  assign cond   = (mode == MODE_PWM) ? (int'(avg2) < 2 * I_PFM_TH)
                                     : (int'(avg2) > 2 * I_PWM_TH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      on_hold <= '0;
      on_seen <= 1'b0;
      i_on    <= '0;
      i_off   <= '0;
      i_valid <= 1'b0;
      mode    <= MODE_PWM;
      n_cond  <= '0;
      n_pulse <= '0;
    end else begin
      i_valid <= 1'b0;
      if (smp_on) begin
        on_hold <= i_sense;
        on_seen <= 1'b1;
      end
      if (smp_off) begin
        i_on    <= on_use;
        i_off   <= i_sense;
        i_valid <= 1'b1;
        on_seen <= 1'b0;
        n_cond  <= cond ? n_cond + 1'b1 : '0;
        n_pulse <= (mode == MODE_PFM && had_on) ? n_pulse + 1'b1 : '0;
        if ((cond && int'(n_cond) == HOLD - 1) ||
            (mode == MODE_PFM && had_on && int'(n_pulse) == HOLD - 1)) begin
          mode    <= (mode == MODE_PWM) ? MODE_PFM : MODE_PWM;
          n_cond  <= '0;
          n_pulse <= '0;
        end
      end
    end
  end

endmodule
