`timescale 1ps/1fs
// Testbench of tx_pi_model: after n steps of size code c the transmitted clock must lag
// the reference by INIT + n*c*1.25 ps (modulo 6.4 ns), measured between edges.
module tb_tx_pi_model;
  int checks = 0, failures = 0;
  logic clk = 0, en = 0, dir = 1, co;
  logic [3:0] sz = 4'd1;
  realtime tin, tout;
  always #3200 clk = ~clk;
  tx_pi_model #(.INIT_PHASE_FS(100_000)) dut (.clk_in(clk), .step_en(en), .step_dir(dir), .txpippmstepsize(sz), .clk_out(co));
  always @(posedge clk) tin = $realtime;
  always @(posedge co) tout = $realtime;
  real expect_ps = 100.0;
  task automatic measure;
    real d;
    repeat (3) @(posedge clk);
    @(posedge co); #0.001;
    d = tout - tin;
    while (d < 0) d += 6400.0;
    while (d >= 6400.0) d -= 6400.0;
    checks++;
    if (d - expect_ps > 0.01 || d - expect_ps < -0.01) begin failures++; $display("FAIL delay %0.3f exp %0.3f", d, expect_ps); end
  endtask
  initial begin
    measure();
    for (int k = 0; k < 10; k++) begin
      int n;
      n   = $urandom_range(40);
      sz  = 4'($urandom_range(1, 15));
      dir = $urandom_range(1);
      repeat (n) begin @(negedge clk); en = 1; end
      @(negedge clk); en = 0;
      expect_ps += (dir ? 1.0 : -1.0) * n * sz * 1.25;
      while (expect_ps < 0) expect_ps += 6400.0;
      measure();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(50_000_000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
