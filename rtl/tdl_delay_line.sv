`timescale 1ps/1fs
// Behavioural model of a tapped delay line (TDL) together with the capture register bank
// that samples it, the fine-time element of an FPGA TDC.
//
// Not synthesizable: in the FPGA the line is a chain of carry elements whose outputs feed
// the slice flip-flops directly. The hit first passes an input routing delay IN_DELAY_PS
// and then travels along NTAPS taps of TAP_PS each, so at a rising edge of clk tap i holds
// the hit as it was IN_DELAY_PS + i*TAP_PS earlier. The model keeps the times of the
// last few hit transitions and builds the captured pattern from them at every rising
// clk edge; taps changes only there, like the outputs of the capture registers. The line
// must be longer than one clock period so that the most recent rising edge of a
// clock-like hit is always inside it.
//
// The uniform tap delay is an idealisation of a real carry chain, whose bins differ in
// width; the default 10 ps bin and 660 taps (6.6 ns) are this design's choice.
module tdl_delay_line #(
  parameter int unsigned NTAPS       = 660,
  parameter int unsigned TAP_PS      = 10,
  parameter int unsigned IN_DELAY_PS = 200
) (
  input  logic             hit,
  input  logic             clk,
  output logic [NTAPS-1:0] taps
);

  localparam int unsigned HIST = 8;

  realtime et[$];   // transition times, oldest first
  logic    ev[$];   // value after each transition

  initial taps = '0;

  always @(hit) begin
    et.push_back($realtime);
    ev.push_back(hit);
    while (et.size() > HIST) begin
      void'(et.pop_front());
      void'(ev.pop_front());
    end
  end

  always @(posedge clk) begin
    logic [NTAPS-1:0] p;
    realtime          tt;
    int               j;
    j = et.size() - 1;
    p = '0;
    for (int i = 0; i < NTAPS; i++) begin
      tt = $realtime - real'(IN_DELAY_PS) - real'(i) * real'(TAP_PS);
      while (j >= 0 && et[j] > tt) j--;
      if (j >= 0)            p[i] = ev[j];
      else if (et.size() > 0) p[i] = ~ev[0];
      else                   p[i] = hit;
    end
    taps <= p;
  end

endmodule
