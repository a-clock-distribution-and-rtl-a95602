`timescale 1ps/1fs
// One level of a cascaded clock distribution, for testbenches: an upstream board acting as
// master, one link in each direction, the downstream board acting as slave, the slave's
// jitter cleaner, and an operator with an oscilloscope for the 3 m calibration.
//
// The upstream main clock m_main_clk comes in from outside (the oscillator for the first
// level, the slave main clock of the level above for the next one), so stages can be
// chained. The downstream main clock goes out on s_main_clk. A pulse on `start` runs the
// synchronization procedure of tb_clksync_top: SYNC and calibration over the 3 m fibre,
// operator trim, aligned capture, exchange for the long fibre, SYNC, automatic phase
// synchronization, final SYNC. `done` rises when it has finished. The stage counts its own
// checks and failures, including one for each mechanism that never happened, and
// `skew_ps` holds the last scope reading (downstream behind upstream).
module tb_cascade_stage
  import clksync_pkg::*;
#(
  parameter int unsigned NAVG        = 400,
  parameter longint      M_PI_INIT   = 0,
  parameter longint      S_PI_INIT   = 0,
  parameter longint      D_3M_FS     = 60_123_400,
  parameter longint      D_LONG_FS   = 60_123_400,
  parameter longint      TS_DELAY_FS = 812_300,
  parameter real         JITTER_PS   = 6.0,
  parameter real         SKEW_TOL_PS = 4.0
) (
  input  logic m_main_clk,
  input  logic rst,
  input  logic start,
  output logic s_main_clk,
  output logic done,
  output int   checks,
  output int   failures,
  output real  skew_ps
);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (%m): %s", what);
    end
  endtask

  function automatic real jit(input real pk);
    return ($itor($urandom_range(2000)) / 1000.0 - 1.0) * pk;
  endfunction

  // ---------------- link and jitter cleaner ----------------
  logic   m_rec_clk, s_rec_clk, m_tx_clk, s_tx_clk;
  word_t  m_tx_word, s_tx_word, m_rx_word, s_rx_word;
  longint link_fs = D_3M_FS;

  initial begin
    s_main_clk = 1'b0;
    done       = 1'b0;
    checks     = 0;
    failures   = 0;
    skew_ps    = 0.0;
  end

  always @(s_rec_clk) begin
    automatic logic v  = s_rec_clk;
    automatic real  dl = real'(TS_DELAY_FS) / 1000.0 + jit(JITTER_PS / 2.0);
    fork
      begin
        #(dl) s_main_clk = v;
      end
    join_none
  end

  tb_link_model u_down (.tx_clk(m_tx_clk), .tx_word(m_tx_word), .delay_fs(link_fs),
                        .rx_clk(s_main_clk), .rec_clk(s_rec_clk), .rx_word(s_rx_word));
  tb_link_model u_up   (.tx_clk(s_tx_clk), .tx_word(s_tx_word), .delay_fs(link_fs),
                        .rx_clk(m_main_clk), .rec_clk(m_rec_clk), .rx_word(m_rx_word));

  // ---------------- the two boards ----------------
  logic   m_sync_start = 0, m_cal_raw = 0, m_trim_en = 0, m_trim_dir = 0;
  logic   m_cal_aligned = 0, m_phase_start = 0;
  cnt_t   m_count, s_count, m_k, m_coarse_offset;
  phase_t m_tdc_mean, s_tdc_mean, m_phase_target;
  logic   m_tdc_valid, s_tdc_valid, m_locked, s_locked, m_sync_done, m_k_odd, m_phase_done;
  logic [15:0] m_pi_steps, s_pi_steps;

  clksync_top #(.NAVG(NAVG), .M_PI_INIT_FS(M_PI_INIT), .S_PI_INIT_FS(S_PI_INIT)) dut (
    .rst,
    .m_main_clk, .m_rec_clk, .m_tx_clk, .m_tx_word, .m_rx_word,
    .m_sync_start, .m_cal_raw, .m_trim_en, .m_trim_dir, .m_cal_aligned, .m_phase_start,
    .m_count, .m_tdc_mean, .m_tdc_valid, .m_locked, .m_sync_done, .m_k, .m_k_odd,
    .m_coarse_offset, .m_phase_done, .m_phase_target, .m_pi_steps,
    .s_main_clk, .s_rec_clk, .s_tx_clk, .s_tx_word, .s_rx_word,
    .s_count, .s_tdc_mean, .s_tdc_valid, .s_locked, .s_pi_steps);

  // ---------------- oscilloscope ----------------
  realtime t_m_edge = 0;
  cnt_t    m_count_at_edge;
  always @(posedge m_main_clk) begin
    t_m_edge        = $realtime;
    m_count_at_edge = m_count;
  end

  // Skew of a slave edge at time ts behind the nearest master edge, wrapped into +-T/2.
  // The master edge is read 50 ps after ts, longer than any edge jitter, so a master edge
  // just after ts counts too: taking only master edges up to ts would favour early master
  // edges and bias the mean by about a quarter of the jitter span.
  task automatic nearest_skew_wait(input realtime ts, output real d);
    #(50);
    d = ts - t_m_edge;
    while (d > 3200.0) d -= 6400.0;
    while (d <= -3200.0) d += 6400.0;
  endtask

  task automatic scope_skew(input int n, output real skew);
    real acc, d;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge s_main_clk);
      nearest_skew_wait($realtime, d);
      acc += d;
    end
    skew = acc / n;
  endtask

  task automatic coarse_diff(output longint diff);
    real d;
    @(posedge s_main_clk);
    #1;
    d = $realtime - 1.0 - t_m_edge;
    diff = longint'($signed(s_count - m_count_at_edge));
    if (d > 3200.0) diff = diff - 1;
  endtask

  // ---------------- mechanism counters ----------------
  int   n_sync = 0, n_offset_load = 0, n_ts_reports = 0, n_trims = 0;
  logic sync_done_q = 1'b0;
  always @(posedge m_main_clk) begin
    sync_done_q <= m_sync_done && !rst;
    if (!rst && m_sync_done && !sync_done_q) n_sync++;
    if (!rst && dut.u_master.g_master.ts_valid) n_ts_reports++;
    if (m_trim_en) n_trims++;
  end
  always @(posedge s_main_clk) if (!rst && dut.u_slave.offset_load) n_offset_load++;

  task automatic m_pulse(ref logic sig);
    @(negedge m_main_clk); sig = 1'b1;
    @(negedge m_main_clk); sig = 1'b0;
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge m_main_clk);
  endtask

  task automatic run_sync(output longint cd);
    m_pulse(m_sync_start);
    wait (m_sync_done);
    wait_cycles(4 * (int'(link_fs / 6_400_000) + 50));
    $display("  %m: K=%0d odd=%0d offset=%0d", $signed(m_k), m_k_odd, $signed(m_coarse_offset));
    check(longint'($signed(m_k)) >= 2 * (link_fs / 6_400_000) && longint'($signed(m_k)) <= 2 * (link_fs / 6_400_000) + 24,
          "K matches the round-trip delay");
    coarse_diff(cd);
  endtask

  real    skew;
  longint cd;
  int     steps;
  int     lock_wait;
  bit     long_k_odd = 1'b0;   // K parity of the first SYNC over the long fibre

  initial begin
    @(posedge start);
    lock_wait = 0;
    while (!(m_locked && s_locked) && lock_wait < 40 * NAVG) begin
      @(posedge m_main_clk);
      lock_wait++;
    end
    check(m_locked && s_locked, "both phase lock modules lock");
    check(m_pi_steps > 0 && s_pi_steps > 0, "phase lock stepped the PI on both boards");

    // calibration with the 3 m fibre
    run_sync(cd);
    check(cd >= -2 && cd <= 2, "coarse counters aligned after SYNC (3 m)");
    m_pulse(m_cal_raw);
    wait (!dut.u_master.g_master.ps_busy);
    for (int it = 0; it < 6; it++) begin
      scope_skew(256, skew);
      if (skew < 0.7 && skew > -0.7) break;
      steps = int'(-skew / 1.25);
      m_trim_dir = (steps > 0);
      if (steps < 0) steps = -steps;
      repeat (steps) m_pulse(m_trim_en);
      wait_cycles(6 * NAVG);
      wait (m_locked);
    end
    scope_skew(256, skew);
    check(skew < 1.0 && skew > -1.0, "operator aligned the clocks with the 3 m fibre");
    m_pulse(m_cal_aligned);
    wait (!dut.u_master.g_master.ps_busy);

    // long fibre
    link_fs = D_LONG_FS;
    wait_cycles(int'(D_LONG_FS / 6_400_000) * 2 + 100);
    run_sync(cd);
    long_k_odd = m_k_odd;
    check(cd >= -2 && cd <= 2, "coarse counters aligned after SYNC (long fibre)");
    m_pulse(m_phase_start);
    wait (m_phase_done);
    wait_cycles(2 * NAVG);
    scope_skew(1024, skew);
    skew_ps = skew;
    $display("  %m: skew after phase sync %0.2f ps", skew);
    check(skew < SKEW_TOL_PS && skew > -SKEW_TOL_PS, "main clocks aligned over the long fibre");
    check(dut.u_master.g_master.corrections > 0, "phase synchronization moved the master PI");
    run_sync(cd);
    check(cd >= -2 && cd <= 2, "coarse counters aligned after a second SYNC");

    check(n_sync == 3, "three SYNC exchanges completed");
    check(n_offset_load == 3, "slave loaded three offsets");
    check(n_ts_reports > 0, "slave TDC readings reached the master");
    check(n_trims > 0, "operator trim used");
    done = 1'b1;
  end

endmodule
