`timescale 1ps/1fs
// Testbench of phase_averager: windows of NAVG samples, including windows that straddle
// the 0 / 6.4 ns wrap, must give the circular mean worked out here, one mean per window.
module tb_phase_averager;
  import clksync_pkg::*;
  localparam int NAVG = 50;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sv = 0;
  phase_t s = '0, mean;
  logic mv;
  int nmeans = 0;
  always #3200 clk = ~clk;
  phase_averager #(.NAVG(NAVG)) dut (.clk, .rst, .clear(1'b0), .sample_valid(sv), .sample(s), .mean_valid(mv), .mean);
  always @(posedge clk) if (mv && !rst) nmeans++;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int w = 0; w < 8; w++) begin
      real center, acc, expm;
      center = (w % 2 == 0) ? 10.0 + $urandom_range(300) : 1000.0 + $urandom_range(4000);
      if (w == 3) center = 6395.0;
      acc = 0;
      for (int i = 0; i < NAVG; i++) begin
        real v;
        int  r;
        r = $urandom_range(40);
        v = center + real'(r - 20);
        acc += v;
        while (v >= 6400.0) v -= 6400.0;
        while (v < 0.0) v += 6400.0;
        if (i % 7 == 3) begin @(negedge clk); sv = 0; end   // gaps between samples
        @(negedge clk);
        sv = 1; s = phase_t'(int'(v * 16.0));
      end
      @(negedge clk); sv = 0;
      @(posedge clk); #1;
      expm = acc / NAVG;
      while (expm >= 6400.0) expm -= 6400.0;
      while (expm < 0.0) expm += 6400.0;
      checks++;
      if ((real'(mean) / 16.0 - expm > 0.2 || real'(mean) / 16.0 - expm < -0.2)
          && !(expm > 6399.8 || expm < 0.2)) begin
        failures++; $display("FAIL window %0d mean %0.3f exp %0.3f", w, real'(mean) / 16.0, expm);
      end
      checks++;
      if (nmeans != w + 1) begin failures++; $display("FAIL mean count %0d", nmeans); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(100_000_000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
