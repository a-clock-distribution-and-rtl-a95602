`timescale 1ps/1fs
// Testbench of coarse_counter: counts one per clock from reset, and an offset load
// subtracts the offset while the count keeps advancing.
module tb_coarse_counter;
  import clksync_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ld = 0;
  cnt_t ofs = '0, count, model;
  always #3200 clk = ~clk;
  coarse_counter dut (.clk, .rst, .offset_load(ld), .offset(ofs), .count);
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    model = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      checks++;
      if (count != model) begin failures++; $display("FAIL cycle %0d: %0d != %0d", i, count, model); end
      ld  = (i % 37 == 5);
      ofs = ld ? cnt_t'($urandom) : '0;
      model = model + 1 - (ld ? ofs : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(10_000_000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
