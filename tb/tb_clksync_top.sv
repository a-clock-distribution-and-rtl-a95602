`timescale 1ps/1fs
// End-to-end testbench of the master/slave clock distribution system.
//
// The testbench plays the parts outside the FPGA logic: the master oscillator (156.25 MHz
// with a few ps of random edge jitter), both directions of the optical link
// (tb_link_model), the slave's jitter cleaner (a fixed delay with its own small jitter)
// and the operator with an oscilloscope, who measures the skew between the two main
// clocks. The sequence follows the synchronization procedure:
//   1. reset; the phase lock modules pull both transmitted clocks to their preset,
//      starting from a non-zero initial PI phase;
//   2. 3 m reference fibre: SYNC exchange (coarse counters), raw capture of Tm/Ts,
//      operator trims the master PI until the scope shows zero skew, aligned capture;
//   3. fibre is exchanged for a long one (default 5 km): SYNC exchange again, then the
//      automatic phase synchronization; the skew seen on the scope must be within
//      SKEW_TOL_PS and the coarse counters must agree;
//   4. a second SYNC exchange after the phase move checks coarse alignment again;
//   5. both boards are reset, as at a power cycle: they lock again, and a SYNC exchange
//      and the phase synchronization with the kept calibration realign the clocks.
// Every mechanism is counted (PI steps by the phase lock of either board, SYNC exchanges,
// offset loads, odd K, slave TDC reports, operator trims, phase-sync corrections) and a
// mechanism that never happened is a failure.
module tb_clksync_top;
  import clksync_pkg::*;

  localparam int unsigned NAVG        = 400;
  localparam longint      M_PI_INIT   = 2_345_000;   // fs
  localparam longint      S_PI_INIT   = 4_100_000;   // fs
  localparam longint      D_3M_FS     = 60_123_400;  // transceivers + 3 m fibre
  localparam longint      D_LONG_FS   = 64'd60_123_400 - 64'd14_700_000 + 64'd24_500_000_000 + 64'd4_931_300; // 5 km
  localparam longint      TS_DELAY_FS = 812_300;     // jitter cleaner path on the slave
  localparam real         JITTER_PS   = 6.0;         // peak, uniform
  localparam real         SKEW_TOL_PS = 4.0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- clocks and link ----------------
  logic   m_main_clk = 1'b0;
  logic   s_main_clk = 1'b0;
  logic   m_rec_clk, s_rec_clk, m_tx_clk, s_tx_clk;
  word_t  m_tx_word, s_tx_word, m_rx_word, s_rx_word;
  longint link_fs = D_3M_FS;

  function automatic real jit(input real pk);
    return ($itor($urandom_range(2000)) / 1000.0 - 1.0) * pk;
  endfunction

  // master oscillator + PLL: ideal edges plus independent jitter per edge
  initial begin
    realtime base;
    base = 0;
    forever begin
      base = base + 3200.0;
      #(base + jit(JITTER_PS) - $realtime);
      m_main_clk = ~m_main_clk;
    end
  end

  // slave jitter cleaner (zero-delay mode, but its routing adds TS_DELAY)
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

  // ---------------- DUT ----------------
  logic   rst = 1'b1;
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
  realtime t_m_edge = 0, t_s_edge = 0;
  cnt_t    m_count_at_edge;
  always @(posedge m_main_clk) begin
    t_m_edge        = $realtime;
    m_count_at_edge = m_count;
  end
  always @(posedge s_main_clk) t_s_edge = $realtime;

  // skew of slave main clock behind master main clock, wrapped into +-T/2, averaged
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

  // coarse alignment: slave count at its edge minus master count at the nearest master edge
  task automatic coarse_diff(output longint diff);
    real d;
    @(posedge s_main_clk);
    #1;
    d = $realtime - 1.0 - t_m_edge;
    diff = longint'($signed(s_count - m_count_at_edge));
    if (d > 3200.0) diff = diff - 1;   // nearest master edge is the next one
  endtask

  // ---------------- mechanism counters ----------------
  int n_sync = 0, n_offset_load = 0, n_k_odd = 0, n_ts_reports = 0, n_trims = 0;
  logic sync_done_q = 1'b0;
  always @(posedge m_main_clk) begin
    sync_done_q <= m_sync_done && !rst;
    if (!rst && m_sync_done && !sync_done_q) begin
      n_sync++;
      if (m_k_odd) n_k_odd++;
    end
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
    longint expect_k;
    m_pulse(m_sync_start);
    wait (m_sync_done);
    wait_cycles(4 * (int'(link_fs / 6_400_000) + 50));
    $display("  SYNC: N1=%0d N2=%0d N3=%0d N4=%0d K=%0d odd=%0d offset=%0d",
             dut.u_master.g_master.n1, dut.u_master.g_master.n2, dut.u_master.g_master.n3,
             dut.u_master.g_master.n4, $signed(m_k), m_k_odd, $signed(m_coarse_offset));
    // K from the stored timestamps, worked out here
    expect_k = longint'($signed((dut.u_master.g_master.n4 - dut.u_master.g_master.n1)
                              - (dut.u_master.g_master.n3 - dut.u_master.g_master.n2)));
    check(longint'($signed(m_k)) == expect_k, "K formula");
    // K must match the round trip in periods (within the fixed pipeline latency)
    check(longint'($signed(m_k)) >= 2 * (link_fs / 6_400_000) && longint'($signed(m_k)) <= 2 * (link_fs / 6_400_000) + 24,
          "K matches the round-trip delay");
    coarse_diff(cd);
    $display("  coarse counters: slave - master = %0d", cd);
  endtask

  real    skew;
  longint cd;
  int     steps;
  int     lock_wait;

  initial begin
    $display("link 3 m: %0d fs, long: %0d fs", D_3M_FS, D_LONG_FS);
    repeat (20) @(posedge m_main_clk);
    rst = 1'b0;

    // ---- 1. phase lock after start-up ----
    lock_wait = 0;
    while (!(m_locked && s_locked) && lock_wait < 40 * NAVG) begin
      @(posedge m_main_clk);
      lock_wait++;
    end
    check(m_locked && s_locked, "both phase lock modules lock after start-up");
    $display("locked after %0d cycles, PI steps master %0d slave %0d", lock_wait, m_pi_steps, s_pi_steps);
    check(m_pi_steps > 0 && s_pi_steps > 0, "phase lock stepped the PI on both boards");
    // the transmitted clocks sit at the preset 1.6 ns behind the main clock
    check(dut.u_master.u_pi.phase_fs > 1_590_000 && dut.u_master.u_pi.phase_fs < 1_610_000,
          "master PI phase at preset");
    check(dut.u_slave.u_pi.phase_fs > 1_590_000 && dut.u_slave.u_pi.phase_fs < 1_610_000,
          "slave PI phase at preset");

    // ---- 2. calibration with the 3 m fibre ----
    $display("3 m fibre:");
    run_sync(cd);
    check(cd >= -2 && cd <= 2, "coarse counters aligned after SYNC (3 m)");
    m_pulse(m_cal_raw);
    wait (!dut.u_master.g_master.ps_busy);
    $display("  Tm_3m=%0.3f ps Ts_3m=%0.3f ps", real'(dut.u_master.g_master.tm3) / 16.0,
             real'(dut.u_master.g_master.ts3) / 16.0);
    // operator: trim until the scope shows no skew
    for (int it = 0; it < 6; it++) begin
      scope_skew(256, skew);
      $display("  scope skew %0.2f ps", skew);
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
    $display("  Tm'_3m=%0.3f ps", real'(dut.u_master.g_master.tm3al) / 16.0);

    // ---- 3. long fibre ----
    link_fs = D_LONG_FS;
    $display("long fibre:");
    wait_cycles(int'(D_LONG_FS / 6_400_000) * 2 + 100);
    scope_skew(256, skew);
    $display("  skew before phase sync %0.2f ps", skew);
    run_sync(cd);
    check(cd >= -2 && cd <= 2, "coarse counters aligned after SYNC (long fibre)");
    m_pulse(m_phase_start);
    wait (m_phase_done);
    $display("  target %0.3f ps, corrections %0d", real'(m_phase_target) / 16.0,
             dut.u_master.g_master.corrections);
    // target worked out here from the captured values, eq. (11) with K parity
    begin
      real tm3, ts3, tm3al, tmx, tsx, tgt;
      tm3   = real'(dut.u_master.g_master.tm3) / 16.0 + (dut.u_master.g_master.u_psync.k3_odd ? 6400.0 : 0.0);
      ts3   = real'(dut.u_master.g_master.ts3) / 16.0;
      tm3al = real'(dut.u_master.g_master.tm3al) / 16.0;
      tsx   = real'(dut.u_master.g_master.u_psync.ts_last) / 16.0;
      // Tm_x itself is not stored; the target is checked through the result on the scope
      tmx = 0; tgt = 0;
      check(tm3al >= 0 && tm3al < 6400.0 && tsx >= 0 && tsx < 6400.0 && tm3 >= 0,
            "calibration values in range");
    end
    wait_cycles(2 * NAVG);
    scope_skew(1024, skew);
    $display("  skew after phase sync %0.2f ps", skew);
    check(skew < SKEW_TOL_PS && skew > -SKEW_TOL_PS, "main clocks aligned over the long fibre");
    check(dut.u_master.g_master.corrections > 0, "phase synchronization moved the master PI");

    // ---- 4. coarse alignment after the phase move ----
    run_sync(cd);
    check(cd >= -2 && cd <= 2, "coarse counters aligned after a second SYNC");

    // ---- 5. restart of both boards; the calibration is kept ----
    begin
      phase_t tm3_kept, ts3_kept, tm3al_kept;
      tm3_kept   = dut.u_master.g_master.tm3;
      ts3_kept   = dut.u_master.g_master.ts3;
      tm3al_kept = dut.u_master.g_master.tm3al;
      $display("restart:");
      @(negedge m_main_clk); rst = 1'b1;
      repeat (20) @(posedge m_main_clk);
      rst = 1'b0;
      lock_wait = 0;
      while (!(m_locked && s_locked) && lock_wait < 40 * NAVG) begin
        @(posedge m_main_clk);
        lock_wait++;
      end
      check(m_locked && s_locked, "both phase lock modules lock after the restart");
      check(dut.u_master.g_master.tm3 == tm3_kept && dut.u_master.g_master.ts3 == ts3_kept
            && dut.u_master.g_master.tm3al == tm3al_kept, "calibration kept through the restart");
      run_sync(cd);
      check(cd >= -2 && cd <= 2, "coarse counters aligned after the restart");
      m_pulse(m_phase_start);
      wait (m_phase_done);
      wait_cycles(2 * NAVG);
      scope_skew(1024, skew);
      $display("  skew after the restart %0.2f ps", skew);
      check(skew < SKEW_TOL_PS && skew > -SKEW_TOL_PS, "main clocks aligned again after the restart");
    end

    // ---- mechanisms ----
    $display("mechanisms: sync=%0d offset_load=%0d k_odd=%0d ts_reports=%0d trims=%0d",
             n_sync, n_offset_load, n_k_odd, n_ts_reports, n_trims);
    check(n_sync == 4, "four SYNC exchanges completed");
    check(n_offset_load == 4, "slave loaded four offsets");
    check(n_k_odd > 0, "an odd K occurred");
    check(n_ts_reports > 0, "slave TDC readings reached the master");
    check(n_trims > 0, "operator trim used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // keep the log current during long runs
  initial forever begin
    #(100_000_000.0);
    $fflush();
  end

  initial begin
    #(400_000_000_000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
