`timescale 1ps/1fs
// Three-level cascade testbench: board 1 generates the system clock, board 2 receives it
// over a 5 km link and sends its own main clock on over a second 5 km link to board 3.
//
// Each level is a tb_cascade_stage (one master board, one slave board, the links, the
// jitter cleaner and an operator for its 3 m calibration). The middle board is
// represented by the slave board of level 1 and the master board of level 2 sharing one
// main clock: the level-1 slave main clock drives the level-2 master. The two levels are
// calibrated and synchronized one after the other, top-down, since the master clock of
// level 2 must be settled first. The two fibre rolls differ by a few nanoseconds, so the
// two round trips fall on different fractions of a period and K differs in parity. At the end the scope compares
// every pair of the three main clocks; the skews of the two levels add up at the third
// board, which must stay within twice the per-level limit.
module tb_clksync_cascade;
  import clksync_pkg::*;

  localparam int unsigned NAVG        = 400;
  localparam longint      D_3M_FS     = 60_123_400;
  localparam longint      D_L1_FS     = 64'd60_123_400 - 64'd14_700_000 + 64'd24_500_000_000 + 64'd4_931_300;
  localparam longint      D_L2_FS     = 64'd60_123_400 - 64'd14_700_000 + 64'd24_500_000_000 + 64'd2_517_900;
  localparam real         JITTER_PS   = 6.0;
  localparam real         SKEW_TOL_PS = 4.0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real jit(input real pk);
    return ($itor($urandom_range(2000)) / 1000.0 - 1.0) * pk;
  endfunction

  logic clk1 = 1'b0;   // board 1 main clock (oscillator)
  logic clk2, clk3;    // board 2 and board 3 main clocks
  logic rst = 1'b1;
  logic start1 = 1'b0, start2 = 1'b0;
  logic done1, done2;
  int   checks1, failures1, checks2, failures2;
  real  skew1, skew2;

  initial begin
    realtime base;
    base = 0;
    forever begin
      base = base + 3200.0;
      #(base + jit(JITTER_PS) - $realtime);
      clk1 = ~clk1;
    end
  end

  tb_cascade_stage #(.NAVG(NAVG), .M_PI_INIT(2_345_000), .S_PI_INIT(4_100_000),
                     .D_3M_FS(D_3M_FS), .D_LONG_FS(D_L1_FS), .TS_DELAY_FS(812_300),
                     .JITTER_PS(JITTER_PS), .SKEW_TOL_PS(SKEW_TOL_PS)) u_l1 (
    .m_main_clk(clk1), .rst, .start(start1), .s_main_clk(clk2), .done(done1),
    .checks(checks1), .failures(failures1), .skew_ps(skew1));

  tb_cascade_stage #(.NAVG(NAVG), .M_PI_INIT(5_010_000), .S_PI_INIT(730_000),
                     .D_3M_FS(D_3M_FS + 1_370_000), .D_LONG_FS(D_L2_FS), .TS_DELAY_FS(655_800),
                     .JITTER_PS(JITTER_PS), .SKEW_TOL_PS(SKEW_TOL_PS)) u_l2 (
    .m_main_clk(clk2), .rst, .start(start2), .s_main_clk(clk3), .done(done2),
    .checks(checks2), .failures(failures2), .skew_ps(skew2));

  // scope: last rising edge of each clock
  realtime t1 = 0, t2 = 0;
  always @(posedge clk1) t1 = $realtime;
  always @(posedge clk2) t2 = $realtime;

  // Mean skew of one main clock behind another, each edge against the nearest reference
  // edge (read 50 ps later, past any jitter), wrapped into +-T/2.
  task automatic skew_3_1(input int n, output real skew);
    real acc, d;
    realtime ts;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk3);
      ts = $realtime;
      #(50);
      d = ts - t1;
      while (d > 3200.0) d -= 6400.0;
      while (d <= -3200.0) d += 6400.0;
      acc += d;
    end
    skew = acc / n;
  endtask

  task automatic skew_2_1(input int n, output real skew);
    real acc, d;
    realtime ts;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk2);
      ts = $realtime;
      #(50);
      d = ts - t1;
      while (d > 3200.0) d -= 6400.0;
      while (d <= -3200.0) d += 6400.0;
      acc += d;
    end
    skew = acc / n;
  endtask

  task automatic skew_3_2(input int n, output real skew);
    real acc, d;
    realtime ts;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk3);
      ts = $realtime;
      #(50);
      d = ts - t2;
      while (d > 3200.0) d -= 6400.0;
      while (d <= -3200.0) d += 6400.0;
      acc += d;
    end
    skew = acc / n;
  endtask

  real s21, s32, s31;
  bit  k1_odd, k2_odd;

  initial begin
    repeat (20) @(posedge clk1);
    rst = 1'b0;
    $display("level 1:");
    @(negedge clk1); start1 = 1'b1;
    wait (done1);
    k1_odd = u_l1.long_k_odd;
    $display("level 2:");
    @(negedge clk2); start2 = 1'b1;
    wait (done2);
    k2_odd = u_l2.long_k_odd;
    repeat (2 * NAVG) @(posedge clk1);

    // all three pairs over the same window, so that phase lock steps in between cancel
    fork
      skew_2_1(1024, s21);
      skew_3_2(1024, s32);
      skew_3_1(1024, s31);
    join
    $display("skews: board2-board1 %0.2f ps, board3-board2 %0.2f ps, board3-board1 %0.2f ps",
             s21, s32, s31);
    $display("K parity: level 1 %0d, level 2 %0d", k1_odd, k2_odd);
    check(s21 < SKEW_TOL_PS && s21 > -SKEW_TOL_PS, "board 2 aligned to board 1");
    check(s32 < SKEW_TOL_PS && s32 > -SKEW_TOL_PS, "board 3 aligned to board 2");
    check(s31 < 2.0 * SKEW_TOL_PS && s31 > -2.0 * SKEW_TOL_PS, "board 3 aligned to board 1");
    check((s31 - s21 - s32) < 1.0 && (s31 - s21 - s32) > -1.0, "skews of the two levels add up");
    check(k1_odd != k2_odd, "one level with odd K and one with even K");

    checks   += checks1 + checks2;
    failures += failures1 + failures2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial forever begin
    #(100_000_000.0);
    $fflush();
  end

  initial begin
    #(800_000_000_000.0);
    failures += 1 + failures1 + failures2;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks1 + checks2, failures);
    $finish;
  end

endmodule
