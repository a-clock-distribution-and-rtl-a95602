`timescale 1ps/1fs
// Testbench of tdc_channel (with the delay line model in front): a clock-like hit with a
// known delay behind the sampling clock must give fine = (T - delay - IN_DELAY)/TAP taps
// (within one tap), with the coarse count of the sampling edge, 3 cycles later.
module tb_tdc_channel;
  import clksync_pkg::*;
  localparam int NTAPS = 660, TAP = 10, IND = 200;
  int checks = 0, failures = 0;
  logic clk = 0, hit = 0, rst = 1;
  logic [NTAPS-1:0] taps;
  cnt_t cnt = 0, coarse;
  logic valid;
  logic [$clog2(NTAPS)-1:0] fine;
  real  dly = 1234.0;
  always #3200 clk = ~clk;
  always @(clk) begin
    automatic logic v = clk;
    automatic real d = dly;
    fork begin #(d) hit = v; end join_none
  end
  always @(posedge clk) cnt <= cnt + 1;
  tdl_delay_line #(.NTAPS(NTAPS), .TAP_PS(TAP), .IN_DELAY_PS(IND)) u_tdl (.hit, .clk, .taps);
  tdc_channel #(.NTAPS(NTAPS)) dut (.clk, .rst, .taps, .coarse_in(cnt), .valid, .fine, .coarse);
  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 12; k++) begin
      real expf;
      dly = 100.0 + $urandom_range(6000);
      repeat (6) @(posedge clk);
      #1;
      expf = (6400.0 - dly - IND) / TAP;
      if (expf < 0) expf += 640.0;
      checks++;
      if (!valid || $itor(fine) < expf - 1.0 || $itor(fine) > expf + 1.0) begin
        failures++; $display("FAIL dly=%0.1f fine=%0d exp=%0.1f", dly, fine, expf);
      end
      checks++;
      if (coarse != cnt - 3) begin failures++; $display("FAIL coarse %0d cnt %0d", coarse, cnt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(10_000_000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
