`timescale 1ps/1fs
// Testbench of tdl_delay_line: a rising hit edge at a known time before the sampling
// clock edge must appear as ones in exactly the taps whose delay it has already passed:
// tap i is 1 when IN_DELAY + i*TAP < elapsed time.
module tb_tdl_delay_line;
  localparam int NTAPS = 100, TAP = 10, IND = 50;
  int checks = 0, failures = 0;
  logic hit = 0, clk = 0;
  logic [NTAPS-1:0] taps;
  tdl_delay_line #(.NTAPS(NTAPS), .TAP_PS(TAP), .IN_DELAY_PS(IND)) dut (.hit, .clk, .taps);
  initial begin
    for (int k = 0; k < 40; k++) begin
      int el;
      int ones;
      el = 65 + 10 * $urandom_range(90);  // ps between hit edge and clock edge, off the tap boundaries
      #(2000);
      hit = 1;
      #(el);
      clk = 1;
      #1;
      ones = 0;
      for (int i = 0; i < NTAPS; i++) begin
        logic exp;
        exp = (IND + i * TAP < el);
        checks++;
        if (taps[i] !== exp) begin failures++; $display("FAIL el=%0d tap %0d", el, i); end
      end
      #(500) clk = 0;
      hit = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(10_000_000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
