`timescale 1ns / 1ps
// hybrid_dpwm: hybrid counter-comparator / tapped-delay-line DPWM.
//
// The duty word d = {M, L} has CNT_BITS coarse bits M and FINE_BITS fine
// bits L; the pulse is d / 2^DUTY_BITS of a switching period of 2^CNT_BITS
// clocks (32 clocks of 31.25 ns: 1 MHz). A free-running counter starts each
// period; the pulse is high through clock cycles 0 .. M-1 (coarse window),
// and during cycle M a one-cycle "extension" signal is passed through the
// delay line: the output stays high until tap L of the delayed extension
// arrives, i.e. for L sixteenths of a clock more. So the pulse ends at
// (16*M + L) * Tclk / 16 after the period start, with d = 0 giving no pulse.
//
// The duty word is latched at the clock edge that starts a period.
// `period_start` is high in cycle 0 (end of the previous off-time) and
// `on_end` in the first whole cycle after the pulse has ended (cycle M+1),
// when the duty is non-zero; both are clock-synchronous strobes used to
// sample the inductor current. The output `pwm` is combinational from
// registers and the delay line. The split into 5 counter bits and 4 delay
// line bits is a choice of this implementation.
module hybrid_dpwm
  import pfpid_pkg::*;
#(
  parameter real TAP_NS = 31.25 / 16.0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  duty_t duty,
  output logic  pwm,
  output logic  period_start,
  output logic  on_end
);

  localparam int TAPS = 1 << FINE_BITS;

  logic [CNT_BITS-1:0]  cnt;
  duty_t                duty_lat;
  logic [CNT_BITS-1:0]  m;
  logic [FINE_BITS-1:0] l;
  logic                 coarse;
  logic                 ext;
  logic [TAPS-1:0]      taps;

  assign m = duty_lat[DUTY_BITS-1:FINE_BITS];
  assign l = duty_lat[FINE_BITS-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '1;
      duty_lat <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) duty_lat <= duty;
    end
  end

  assign coarse       = (cnt < m);
  assign ext          = (cnt == m) && rst_n;
  assign pwm          = coarse | (ext & ~taps[l]);
  assign period_start = (cnt == '0) && rst_n;
  assign on_end       = (cnt == m + 1'b1) && (duty_lat != '0) && rst_n;

  dpwm_delay_line #(.TAPS(TAPS), .TAP_NS(TAP_NS)) u_line (
    .din(ext), .taps
  );

endmodule
