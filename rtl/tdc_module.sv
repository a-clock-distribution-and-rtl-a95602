`timescale 1ps/1fs
// TDC module: two identical TDC channels measuring the phase between two clocks.
//
// Channel A and channel B each have their own delay line and encoder; both are sampled
// by the same system clock (the board's main clock) and share its coarse counter. The
// result is the delay of the rising edges of hit_b after those of hit_a, reduced into
// [0, T_period): phase = (fine_a - fine_b)*TAP_PS mod T_period, in fixed point with
// PH_FRAC fractional bits of a picosecond. A uniform bin width TAP_PS is assumed for the
// conversion (no bin-by-bin calibration).
//
// Timing: phase_valid pulses every clock cycle in which both channels found an edge,
// 4 cycles after the edge at which the delay lines were captured.
module tdc_module
  import clksync_pkg::*;
#(
  parameter int unsigned NTAPS       = 660,
  parameter int unsigned TAP_PS      = 10,
  parameter int unsigned IN_DELAY_PS = 200
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   hit_a,
  input  logic   hit_b,
  input  cnt_t   coarse_in,
  output logic   phase_valid,
  output phase_t phase,
  output cnt_t   coarse
);

  localparam int unsigned FINE_W = $clog2(NTAPS);

  logic [NTAPS-1:0]  taps_a, taps_b;
  logic              va, vb;
  logic [FINE_W-1:0] fa, fb;
  cnt_t              ca, cb;

  tdl_delay_line #(.NTAPS(NTAPS), .TAP_PS(TAP_PS), .IN_DELAY_PS(IN_DELAY_PS))
    u_tdl_a (.hit(hit_a), .clk, .taps(taps_a));
  tdl_delay_line #(.NTAPS(NTAPS), .TAP_PS(TAP_PS), .IN_DELAY_PS(IN_DELAY_PS))
    u_tdl_b (.hit(hit_b), .clk, .taps(taps_b));

  tdc_channel #(.NTAPS(NTAPS)) u_ch_a (
    .clk, .rst, .taps(taps_a), .coarse_in, .valid(va), .fine(fa), .coarse(ca));
  tdc_channel #(.NTAPS(NTAPS)) u_ch_b (
    .clk, .rst, .taps(taps_b), .coarse_in, .valid(vb), .fine(fb), .coarse(cb));

  phase_t diff;
  always_comb begin
    diff = (phase_t'(fa) - phase_t'(fb)) * phase_t'(TAP_PS) * phase_t'(1 << PH_FRAC);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_valid <= 1'b0;
      phase       <= '0;
      coarse      <= '0;
    end else begin
      phase_valid <= va && vb;
      phase       <= wrap_period(diff);
      coarse      <= ca;
    end
  end

  // cb equals ca: both channels share the coarse counter and the sampling clock.
  logic unused_cb;
  assign unused_cb = ^cb;

endmodule
