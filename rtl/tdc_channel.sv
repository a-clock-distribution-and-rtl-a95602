`timescale 1ps/1fs
// One TDC channel: clock counter plus tapped-delay-line interpolation.
//
// At every system clock edge the whole delay line is captured by its register bank
// (inside the delay line model) and registered twice more against metastability. The encoder finds the most recent rising edge of the hit in the
// captured pattern: the lowest index i with taps[i]=1 and taps[i+1]=0 (taps[0] holds the
// newest value). That index is the fine timestamp: the hit edge entered the line i taps
// before the sampling edge. The coarse timestamp is the clock counter value of the
// sampling edge, delayed to line up with the fine result. The time of the hit is
// coarse*T_period - fine*TAP - IN_DELAY, so two channels sampled by the same clock
// differ in time by the difference of their fine values.
//
// Timing: a result appears 3 clock cycles after the edge at which the line was captured; valid is low when no
// rising edge was found in the line. One measurement per clock cycle.
// Following the document: counter plus TDL, the counter gives the coarse and the hit
// position the fine timestamp. The "10" pattern encoder is this design's choice.
module tdc_channel
  import clksync_pkg::*;
#(
  parameter int unsigned NTAPS  = 660,
  parameter int unsigned FINE_W = $clog2(NTAPS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NTAPS-1:0]  taps,
  input  cnt_t              coarse_in,
  output logic              valid,
  output logic [FINE_W-1:0] fine,
  output cnt_t              coarse
);

  logic [NTAPS-1:0] s1, s2;
  cnt_t             c1, c2;
  logic             found;
  logic [FINE_W-1:0] idx;

  always_ff @(posedge clk) begin
    s1 <= taps;
    s2 <= s1;
    c1 <= coarse_in;
    c2 <= c1;
  end

  always_comb begin
    found = 1'b0;
    idx   = '0;
    for (int i = NTAPS - 2; i >= 0; i--) begin
      if (s2[i] && !s2[i+1]) begin
        found = 1'b1;
        idx   = FINE_W'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid  <= 1'b0;
      fine   <= '0;
      coarse <= '0;
    end else begin
      valid  <= found;
      fine   <= idx;
      coarse <= c2;
    end
  end

endmodule
