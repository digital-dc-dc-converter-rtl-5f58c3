`timescale 1ns / 1ps
// sar_logic: timing and successive-approximation logic of the window SAR ADC.
//
// One conversion takes eight clocks, as in the published converter: the
// input is sampled in the first cycle, held in the second, the five bits
// are decided MSB to LSB in cycles three to seven, and the result is
// presented in the eighth, after which the sequence repeats (4 MS/s at a
// 32 MHz clock). During a bit cycle `trial` holds the bits already decided
// plus the bit under test; the comparator answer `cmp` (1: the held input
// is at or above the DAC level of `trial`) is registered at the end of the
// cycle and decides whether the bit stays.
//
// Interface: `sample` is high during the sampling cycle (it also starts the
// comparator's auto-zero); `code`/`valid` change at the clock edge that ends
// the last bit cycle, so `valid` is high for the whole eighth cycle.
// Reset returns to the sampling cycle with a zero result; this and the
// polarity of `cmp` are choices of this implementation.
module sar_logic
  import pfpid_pkg::*;
#(
  parameter int BITS = ADC_BITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmp,
  output logic            sample,
  output logic [BITS-1:0] trial,
  output logic [BITS-1:0] code,
  output logic            valid
);

  sar_phase_e      phase;
  logic [BITS-1:0] result;
  logic [BITS-1:0] test_bit;
  logic            bit_cycle;

  initial assert (BITS == 5 && CONV_CYCLES == 8)
    else $error("sar_logic: phase plan is written for 5 bits in 8 cycles");

  assign bit_cycle = (phase >= PH_B1) && (phase <= PH_B5);
  assign test_bit  = bit_cycle ? (BITS'(1) << (BITS - 1 - int'(3'(phase - PH_B1)))) : '0;
  assign trial     = result | test_bit;
  assign sample    = (phase == PH_SAMPLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= PH_SAMPLE;
      result <= '0;
      code   <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= 1'b0;
      unique case (phase)
        PH_SAMPLE: begin
          result <= '0;
          phase  <= PH_HOLD;
        end
        PH_HOLD:   phase <= PH_B1;
        PH_B5: begin
          code  <= cmp ? trial : result;
          valid <= 1'b1;
          phase <= PH_OUT;
        end
        PH_OUT:    phase <= PH_SAMPLE;
        default: begin
          if (cmp) result <= trial;
          phase <= sar_phase_e'(phase + 3'd1);
        end
      endcase
    end
  end

endmodule
