`timescale 1ps/1fs
// Coarse timestamp counter.
//
// Free-running counter clocked by the board's main clock; its value is the coarse
// timestamp N of eq. (1), t = N * T_period + T_phase. The slave board corrects its
// counter once the SYNC exchange has produced the coarse offset: a one-cycle pulse on
// offset_load subtracts offset from the running count (the count still advances by one
// in that cycle), so afterwards the slave counter reads the master's count. Applying the
// offset in the counter is this design's choice; the offset formula follows eq. (4).
//
// Interface: count is registered, valid from the cycle after reset is released.
module coarse_counter
  import clksync_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         offset_load,
  input  logic [W-1:0] offset,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst)              count <= '0;
    else if (offset_load) count <= count + W'(1) - offset;
    else                  count <= count + W'(1);
  end

endmodule
