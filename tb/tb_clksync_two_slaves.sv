`timescale 1ps/1fs
// One master board driving two slave boards over two transceiver channels, each with its
// own 5 km fibre, synchronized at the same time and then watched for a while.
//
// Each channel is a tb_cascade_stage (master board logic, links, slave board, jitter
// cleaner, operator). The master board is represented by the two stages' master boards
// sharing the one oscillator clock: each channel has its own Tx PI, phase lock module and
// TDC modules, as the transceiver channels of one FPGA do. Both channels run their
// calibration and phase synchronization concurrently. Afterwards the testbench keeps
// running for WATCH_CYCLES cycles and samples the skew of both slaves to the master and to
// each other several times; every sample must stay within the limits (the long-term
// stability run is shortened to what a simulation can cover).
module tb_clksync_two_slaves;
  import clksync_pkg::*;

  localparam int unsigned NAVG         = 400;
  localparam int          WATCH_CYCLES = 20_000;
  localparam int          N_SAMPLES    = 5;
  localparam longint      D_3M_FS      = 60_123_400;
  localparam longint      D_A_FS       = 64'd60_123_400 - 64'd14_700_000 + 64'd24_500_000_000 + 64'd4_931_300;
  localparam longint      D_B_FS       = 64'd60_123_400 - 64'd14_700_000 + 64'd24_500_000_000 + 64'd1_208_600;
  localparam real         JITTER_PS    = 6.0;
  localparam real         SKEW_TOL_PS  = 4.0;

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

  logic clk_m = 1'b0;   // master main clock (oscillator)
  logic clk_a, clk_b;   // the two slave main clocks
  logic rst = 1'b1;
  logic start = 1'b0;
  logic done_a, done_b;
  int   checks_a, failures_a, checks_b, failures_b;
  real  skew_a, skew_b;

  initial begin
    realtime base;
    base = 0;
    forever begin
      base = base + 3200.0;
      #(base + jit(JITTER_PS) - $realtime);
      clk_m = ~clk_m;
    end
  end

  tb_cascade_stage #(.NAVG(NAVG), .M_PI_INIT(2_345_000), .S_PI_INIT(4_100_000),
                     .D_3M_FS(D_3M_FS), .D_LONG_FS(D_A_FS), .TS_DELAY_FS(812_300),
                     .JITTER_PS(JITTER_PS), .SKEW_TOL_PS(SKEW_TOL_PS)) u_ch_a (
    .m_main_clk(clk_m), .rst, .start, .s_main_clk(clk_a), .done(done_a),
    .checks(checks_a), .failures(failures_a), .skew_ps(skew_a));

  tb_cascade_stage #(.NAVG(NAVG), .M_PI_INIT(3_900_000), .S_PI_INIT(1_150_000),
                     .D_3M_FS(D_3M_FS + 2_210_000), .D_LONG_FS(D_B_FS), .TS_DELAY_FS(701_400),
                     .JITTER_PS(JITTER_PS), .SKEW_TOL_PS(SKEW_TOL_PS)) u_ch_b (
    .m_main_clk(clk_m), .rst, .start, .s_main_clk(clk_b), .done(done_b),
    .checks(checks_b), .failures(failures_b), .skew_ps(skew_b));

  realtime tm = 0, ta = 0;
  always @(posedge clk_m) tm = $realtime;
  always @(posedge clk_a) ta = $realtime;

  // Mean skew of one main clock behind another, each edge against the nearest reference
  // edge (read 50 ps later, past any jitter), wrapped into +-T/2.
  task automatic skew_a_m(input int n, output real skew);
    real acc, d;
    realtime ts;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk_a);
      ts = $realtime;
      #(50);
      d = ts - tm;
      while (d > 3200.0) d -= 6400.0;
      while (d <= -3200.0) d += 6400.0;
      acc += d;
    end
    skew = acc / n;
  endtask

  task automatic skew_b_m(input int n, output real skew);
    real acc, d;
    realtime ts;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk_b);
      ts = $realtime;
      #(50);
      d = ts - tm;
      while (d > 3200.0) d -= 6400.0;
      while (d <= -3200.0) d += 6400.0;
      acc += d;
    end
    skew = acc / n;
  endtask

  task automatic skew_b_a(input int n, output real skew);
    real acc, d;
    realtime ts;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk_b);
      ts = $realtime;
      #(50);
      d = ts - ta;
      while (d > 3200.0) d -= 6400.0;
      while (d <= -3200.0) d += 6400.0;
      acc += d;
    end
    skew = acc / n;
  endtask

  real sam, sbm, sba, lo, hi;

  initial begin
    repeat (20) @(posedge clk_m);
    rst = 1'b0;
    @(negedge clk_m); start = 1'b1;
    wait (done_a && done_b);
    lo = 1.0e9;
    hi = -1.0e9;
    for (int k = 0; k < N_SAMPLES; k++) begin
      repeat (WATCH_CYCLES / N_SAMPLES) @(posedge clk_m);
      fork
        skew_a_m(1024, sam);
        skew_b_m(1024, sbm);
        skew_b_a(1024, sba);
      join
      $display("sample %0d: slave A %0.2f ps, slave B %0.2f ps, B-A %0.2f ps", k, sam, sbm, sba);
      check(sam < SKEW_TOL_PS && sam > -SKEW_TOL_PS, "slave A aligned to the master");
      check(sbm < SKEW_TOL_PS && sbm > -SKEW_TOL_PS, "slave B aligned to the master");
      check(sba < SKEW_TOL_PS && sba > -SKEW_TOL_PS, "slaves aligned to each other");
      if (sba < lo) lo = sba;
      if (sba > hi) hi = sba;
    end
    $display("slave-to-slave skew spread over the watch: %0.2f ps", hi - lo);
    check(hi - lo < 2.0 * 1.25 + 1.0, "slave-to-slave skew stable within two PI steps");
    check(u_ch_a.m_locked && u_ch_b.m_locked, "both master channels still locked");
    check(u_ch_a.long_k_odd != u_ch_b.long_k_odd, "one channel with odd K and one with even K");

    checks   += checks_a + checks_b;
    failures += failures_a + failures_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial forever begin
    #(100_000_000.0);
    $fflush();
  end

  initial begin
    #(800_000_000_000.0);
    failures += 1 + failures_a + failures_b;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks_a + checks_b, failures);
    $finish;
  end

endmodule
