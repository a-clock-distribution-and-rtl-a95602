`timescale 1ps/1fs
// Averages NAVG consecutive phase measurements.
//
// A clock phase lives on a circle of one period, so a plain sum would break when the
// readings straddle 0 / T_period. The first sample of each window is taken as reference
// and every sample is added as reference + (sample - reference) wrapped into
// (-T/2, T/2]. After NAVG samples the sum is divided by NAVG (a division by a constant),
// the mean is reduced into [0, T) and presented with a one-cycle mean_valid pulse, and a
// new window starts at once. clear restarts the current window.
// The window of 20 000 samples follows the document; the unwrapping is this design's.
//
// Phases are fixed point, PH_FRAC fractional bits of a picosecond; the mean keeps the
// sub-bin resolution that averaging of jittered readings gives.
module phase_averager
  import clksync_pkg::*;
#(
  parameter int unsigned NAVG = 20000
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   clear,
  input  logic   sample_valid,
  input  phase_t sample,
  output logic   mean_valid,
  output phase_t mean
);

  localparam int unsigned CNT_BITS = $clog2(NAVG + 1);
  localparam int unsigned ACC_W    = PH_W + CNT_BITS + 1;
  typedef logic signed [ACC_W-1:0] acc_t;

  logic [CNT_BITS-1:0] n;
  acc_t                acc;
  phase_t              ref_ph;
  phase_t              unwrapped;
  acc_t                acc_next;
  acc_t                quotient;

  always_comb begin
    unwrapped = (n == '0) ? sample : ref_ph + wrap_half(sample - ref_ph);
    acc_next  = acc + acc_t'(unwrapped);
    quotient  = acc_next / acc_t'(NAVG);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      n          <= '0;
      acc        <= '0;
      ref_ph     <= '0;
      mean_valid <= 1'b0;
      if (rst) mean <= '0;
    end else begin
      mean_valid <= 1'b0;
      if (sample_valid) begin
        if (n == '0) ref_ph <= sample;
        if (n == CNT_BITS'(NAVG - 1)) begin
          n          <= '0;
          acc        <= '0;
          mean       <= wrap_period(phase_t'(quotient));
          mean_valid <= 1'b1;
        end else begin
          n   <= n + 1'b1;
          acc <= acc_next;
        end
      end
    end
  end

endmodule
