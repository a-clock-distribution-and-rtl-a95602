`timescale 1ps/1fs
// Testbench of phase_sync_ctrl with a numeric model of the two boards: the master PI
// phase is preset + adj, the slave main clock lags the master main clock by
// p_m + D + Ts, the master TDC reads the round trip (p_m + 2D + Ts + p_s) mod T with K
// parity floor(round trip / T) mod 2, the slave TDC reads Ts. Readings arrive every WIN
// cycles with small noise; a PI step is reported whenever adj has changed.
// The operator calibrates with a short delay and trims to zero skew; then the delay is
// changed and the automatic synchronization must bring the skew within 1.5 ps and
// compute the target of eq. (11), worked out here from the true delays.
module tb_phase_sync_ctrl;
  import clksync_pkg::*;
  localparam int WIN = 16;
  localparam real T = 6400.0;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic tmv = 0, tsv = 0, kodd = 0, lock = 1, lev = 0, pstep = 0;
  phase_t tm = '0, ts = '0, adj, target, tm3, ts3, tm3al;
  logic cal_raw = 0, trim_en = 0, trim_dir = 0, cal_al = 0, sstart = 0;
  logic busy, cal_done, done;
  logic [15:0] corr;
  real D = 61_234.5, TSD = 812.3, P0 = 1600.0, PS = 1600.0;
  always #3200 clk = ~clk;
  phase_sync_ctrl dut (.clk, .rst, .tm_valid(tmv), .tm, .ts_valid(tsv), .ts, .k_odd(kodd),
    .lock, .lock_eval(lev), .pi_step(pstep), .cal_raw, .trim_en, .trim_dir, .cal_aligned(cal_al),
    .sync_start(sstart), .adj, .busy, .cal_done, .done, .target, .tm_3m(tm3), .ts_3m(ts3),
    .tm_3m_al(tm3al), .corrections(corr));
  function automatic real modT(input real x);
    while (x >= T) x -= T;
    while (x < 0) x += T;
    return x;
  endfunction
  function automatic real pm();
    return P0 + real'(adj) / 16.0;
  endfunction
  function automatic real skew();
    real s;
    s = modT(pm() + D + TSD);
    if (s > T / 2) s -= T;
    return s;
  endfunction
  int cyc = 0;
  phase_t adj_seen = '0;
  always @(posedge clk) begin
    real rt;
    cyc++;
    tmv <= 0; tsv <= 0; lev <= 0; pstep <= 0;
    if (cyc % WIN == WIN / 2) begin
      lev <= 1;
      if (adj != adj_seen) begin pstep <= 1; adj_seen = adj; end
    end
    if (cyc % WIN == 0) begin
      rt   = pm() + 2.0 * D + TSD + PS;
      kodd <= (int'($floor(rt / T)) % 2) == 1;
      tmv  <= 1;
      tm   <= phase_t'(int'(modT(rt + $itor($urandom_range(10)) / 10.0 - 0.5) * 16.0));
      tsv  <= 1;
      ts   <= phase_t'(int'(TSD * 16.0));
    end
  end
  task automatic pulse(ref logic s);
    @(negedge clk) s = 1; @(negedge clk) s = 0;
  endtask
  initial begin
    real tm3_true, tm3al_true, tgt, tmx_true;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int round = 0; round < 3; round++) begin
      D = 61_234.5 + 1000.0 * round;
      // calibration
      pulse(cal_raw);
      wait (!busy);
      tm3_true = pm() + 2.0 * D + TSD + PS;     // unwrapped round trip at default phase
      for (int it = 0; it < 3; it++) begin
        int n;
        n = int'(-skew() / 1.25);
        trim_dir = n > 0;
        if (n < 0) n = -n;
        repeat (n) pulse(trim_en);
        repeat (3 * WIN) @(posedge clk);
      end
      checks++; if (skew() > 0.7 || skew() < -0.7) begin failures++; $display("FAIL trim %0.2f", skew()); end
      pulse(cal_al);
      wait (cal_done && !busy);
      tm3al_true = modT(pm() + 2.0 * D + TSD + PS);
      // operating link
      D = 24_561_000.0 + 1777.7 * round + (round == 1 ? 3200.0 : 0.0);
      pulse(sstart);
      wait (done);
      tmx_true = P0 + 2.0 * D + TSD + PS;
      tgt = modT(tm3al_true + modT2(tmx_true - TSD) / 2.0 - modT2(tm3_true - TSD) / 2.0);
      checks++;
      if (real'(target) / 16.0 - tgt > 1.0 || real'(target) / 16.0 - tgt < -1.0) begin
        failures++; $display("FAIL target %0.2f exp %0.2f", real'(target) / 16.0, tgt);
      end
      checks++; if (skew() > 1.5 || skew() < -1.5) begin failures++; $display("FAIL skew %0.2f", skew()); end
      checks++; if (corr == 0) begin failures++; $display("FAIL no correction"); end
      $display("round %0d: target %0.2f skew %0.2f corrections %0d", round, real'(target) / 16.0, skew(), corr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // round trip modulo 2T
  function automatic real modT2(input real x);
    while (x >= 2.0 * T) x -= 2.0 * T;
    while (x < 0) x += 2.0 * T;
    return x;
  endfunction
  initial begin #(64'd5_000_000_000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
