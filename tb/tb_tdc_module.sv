`timescale 1ps/1fs
// Testbench of tdc_module: hit_b is a copy of hit_a delayed by a known amount; the phase
// output must equal that delay modulo 6.4 ns within one 10 ps bin. The result must appear
// 4 cycles after the capture edge and every cycle.
module tb_tdc_module;
  import clksync_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, a = 0, b = 0, rst = 1;
  cnt_t cnt = 0, coarse;
  logic pv;
  phase_t ph;
  real dly = 500.0;
  always #3200 clk = ~clk;
  always @(clk) begin
    automatic logic v  = clk;
    automatic real  da = 777.0;
    automatic real  db = 777.0 + dly;
    fork
      begin #(da) a = v; end
      begin #(db) b = v; end
    join_none
  end
  always @(posedge clk) cnt <= cnt + 1;
  tdc_module dut (.clk, .rst, .hit_a(a), .hit_b(b), .coarse_in(cnt), .phase_valid(pv), .phase(ph), .coarse);
  int nvalid = 0;
  always @(posedge clk) if (pv) nvalid++;
  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 16; k++) begin
      real got;
      int  nv0;
      dly = 20.0 + $urandom_range(6300);
      repeat (8) @(posedge clk);
      #1 nv0 = nvalid;
      repeat (10) @(posedge clk);
      #1;
      got = real'(ph) / 16.0;
      checks++;
      if (!pv || got < dly - 10.0 || got > dly + 10.0) begin
        // allow wrap at the period boundary
        if (!(dly > 6390.0 && got < 10.0)) begin
          failures++; $display("FAIL dly=%0.1f phase=%0.2f", dly, got);
        end
      end
      checks++;
      if (nvalid - nv0 != 10) begin failures++; $display("FAIL one result per cycle: %0d", nvalid - nv0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(10_000_000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
