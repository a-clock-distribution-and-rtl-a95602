`timescale 1ps/1fs
// Testbench of clock_board, configured as a slave board. The testbench supplies the
// recovered clock (with edge jitter), the main clock from the jitter cleaner (recovered
// clock plus TSD and its own jitter) and the received words, and reads the transmitted
// clock and words. Checks, against values worked out here:
//  - the phase lock brings the transmitted clock to the 1.6 ns preset behind the main
//    clock (measured between edges) from a PI that starts at 3.9 ns, and reports lock;
//  - averaged TDC readings come every NAVG cycles and read TSD within 3 ps, and each is
//    reported to the master in a TS_REPORT packet;
//  - a SYNC packet is returned with N2 = count at arrival and N3 = count at departure;
//  - an OFFSET packet moves the coarse counter back by the offset.
module tb_clock_board;
  import clksync_pkg::*;
  localparam int  NAVG = 128;
  localparam real TSD  = 812.3;
  int checks = 0, failures = 0;
  logic rec_clk = 0, main_clk = 0, rst = 1, tx_clk;
  word_t tx_word, rx_word;
  cnt_t count, k, cofs;
  phase_t tdc_mean, tgt;
  logic tdc_valid, locked, sdone, kodd, pdone;
  logic [15:0] pis;
  function automatic real jit(input real pk);
    return ($itor($urandom_range(2000)) / 1000.0 - 1.0) * pk;
  endfunction
  initial begin
    realtime base;
    base = 0;
    forever begin
      base = base + 3200.0;
      #(base + jit(5.0) - $realtime);
      rec_clk = ~rec_clk;
    end
  end
  always @(rec_clk) begin
    automatic logic v  = rec_clk;
    automatic real  dl = TSD + jit(3.0);
    fork
      begin #(dl) main_clk = v; end
    join_none
  end
  clock_board #(.IS_MASTER(1'b0), .NAVG(NAVG), .PI_INIT_FS(3_900_000)) dut (
    .main_clk, .rec_clk, .rst, .tx_clk, .tx_word, .rx_word,
    .sync_start(1'b0), .cal_raw(1'b0), .trim_en(1'b0), .trim_dir(1'b0), .cal_aligned(1'b0),
    .phase_start(1'b0), .count, .tdc_valid, .tdc_mean, .locked, .sync_done(sdone), .k,
    .k_odd(kodd), .coarse_offset(cofs), .phase_done(pdone), .phase_target(tgt), .pi_steps(pis));

  // transmitted words, observed on the main clock
  logic [15:0] pl[$];
  wtype_e hdr;
  cnt_t   t_ret, t_arr;
  int     n_ts = 0;
  phase_t last_ts_pkt;
  always @(posedge main_clk) begin
    if (tx_word[19:16] != W_PAYLOAD && tx_word[19:16] != W_IDLE) begin
      hdr = wtype_e'(tx_word[19:16]);
      if (hdr == W_SYNC_RET) t_ret = count;
      pl.delete();
    end
    if (tx_word[19:16] == W_PAYLOAD) begin
      pl.push_back(tx_word[15:0]);
      if (hdr == W_TS_REPORT && pl.size() == 2) begin
        n_ts++;
        last_ts_pkt = phase_t'({pl[0], pl[1]});
      end
    end
    if (rx_word[19:16] == W_SYNC) t_arr = count;
  end
  // cadence of TDC means
  int n_means = 0, last_mean_cyc = 0, cyc = 0, bad_gap = 0;
  always @(posedge main_clk) begin
    cyc++;
    if (tdc_valid) begin
      if (n_means > 0 && cyc - last_mean_cyc != NAVG) bad_gap++;
      n_means++;
      last_mean_cyc = cyc;
    end
  end
  realtime t_main, t_tx;
  always @(posedge main_clk) t_main = $realtime;
  always @(posedge tx_clk) t_tx = $realtime;

  task automatic send(input word_t w);
    @(negedge main_clk) rx_word = w;
  endtask

  initial begin
    int waitc;
    real d, acc;
    rx_word = mkword(W_IDLE, 0);
    repeat (10) @(posedge main_clk);
    rst = 0;
    waitc = 0;
    while (!locked && waitc < 100 * NAVG) begin @(posedge main_clk); waitc++; end
    checks++; if (!locked) begin failures++; $display("FAIL no lock"); end
    acc = 0;
    for (int i = 0; i < 200; i++) begin
      @(posedge tx_clk); #1;
      d = t_tx - t_main;
      while (d < 0) d += 6400.0;
      while (d >= 6400.0) d -= 6400.0;
      acc += d;
    end
    d = acc / 200.0;
    $display("lock after %0d cycles, %0d PI steps, tx phase %0.2f ps", waitc, pis, d);
    checks++; if (d < 1595.0 || d > 1605.0) begin failures++; $display("FAIL tx phase %0.2f", d); end
    checks++; if (pis < 1800) begin failures++; $display("FAIL PI steps %0d", pis); end
    // TDC reading of the jitter cleaner delay
    @(posedge tdc_valid); #1;
    $display("slave TDC mean %0.2f ps", real'(tdc_mean) / 16.0);
    checks++;
    if (real'(tdc_mean) / 16.0 < TSD - 3.0 || real'(tdc_mean) / 16.0 > TSD + 3.0) begin
      failures++; $display("FAIL TDC mean %0.2f", real'(tdc_mean) / 16.0);
    end
    repeat (20) @(posedge main_clk);
    checks++; if (n_ts == 0 || last_ts_pkt != tdc_mean) begin failures++; $display("FAIL TS report"); end
    checks++; if (bad_gap != 0 || n_means < 3) begin failures++; $display("FAIL mean cadence"); end
    // SYNC
    send(mkword(W_SYNC, 0));
    send(mkword(W_IDLE, 0));
    repeat (12) @(posedge main_clk);
    checks++;
    if (pl.size() < 4 || {pl[0], pl[1]} != t_arr || {pl[2], pl[3]} != t_ret) begin
      failures++; $display("FAIL returned SYNC");
    end
    // OFFSET
    begin
      cnt_t c0;
      int   cyc0;
      @(posedge main_clk); #1 c0 = count; cyc0 = cyc;
      send(mkword(W_OFFSET, 0)); send(mkword(W_PAYLOAD, 16'h0000)); send(mkword(W_PAYLOAD, 16'd1000));
      send(mkword(W_IDLE, 0));
      repeat (10) @(posedge main_clk); #1;
      checks++;
      if (count != c0 + cnt_t'(cyc - cyc0) - 32'd1000) begin
        failures++; $display("FAIL counter after offset");
      end
      checks++; if (cofs != 32'd1000) begin failures++; $display("FAIL offset value"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(64'd2_000_000_000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
