`timescale 1ps/1fs
// Testbench of sync_master. The testbench plays link and slave: it delays words by a
// chosen number of cycles each way, answers SYNC with a returned packet carrying N2/N3
// from a slave counter with a random offset, and sends TS reports. K and the offset must
// match the formulas of eqs. (2)-(4), worked out here from the testbench's own record of
// the four times, and the OFFSET packet must carry the offset.
module tb_sync_master;
  import clksync_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  cnt_t count = 0, scount;
  word_t tx_word, rx_word;
  logic busy, done, tmo, k_odd, tsv;
  cnt_t n1, n2, n3, n4, k, offset;
  phase_t tsval;
  int DOWN, UP, TURN;
  word_t down_q[$], up_q[$];
  cnt_t t1, t2, t3, t4, got_offset;
  logic got_ofs;
  always #3200 clk = ~clk;
  always @(posedge clk) begin count <= count + 1; scount <= scount + 1; end
  sync_master #(.TIMEOUT(2000)) dut (.clk, .rst, .start, .count, .rx_word, .tx_word, .busy, .done,
    .timeout(tmo), .n1, .n2, .n3, .n4, .k, .k_odd, .offset, .ts_valid(tsv), .ts_value(tsval));
  // link with fixed delays; slave emulation
  word_t s_tx [$];
  logic  s_rx_wait;
  int    s_ofs_words;
  always @(posedge clk) begin
    word_t w, r;
    down_q.push_back(tx_word);
    w = (down_q.size() > DOWN) ? down_q.pop_front() : mkword(W_IDLE, 0);
    // slave receive
    if (w[19:16] == W_SYNC) begin
      t2 = scount;
      t3 = scount + cnt_t'(TURN);
      for (int i = 0; i < TURN - 1; i++) s_tx.push_back(mkword(W_IDLE, 0));
      s_tx.push_back(mkword(W_SYNC_RET, 0));
      s_tx.push_back(mkword(W_PAYLOAD, t2[31:16])); s_tx.push_back(mkword(W_PAYLOAD, t2[15:0]));
      s_tx.push_back(mkword(W_PAYLOAD, t3[31:16])); s_tx.push_back(mkword(W_PAYLOAD, t3[15:0]));
    end
    if (w[19:16] == W_OFFSET) s_ofs_words = 2;
    else if (w[19:16] == W_PAYLOAD && s_ofs_words > 0) begin
      got_offset = {got_offset[15:0], w[15:0]};
      s_ofs_words--;
      if (s_ofs_words == 0) got_ofs = 1;
    end
    r = (s_tx.size() > 0) ? s_tx.pop_front() : mkword(W_IDLE, 0);
    up_q.push_back(r);
    rx_word <= (up_q.size() > UP) ? up_q.pop_front() : mkword(W_IDLE, 0);
  end
  // record N1 and N4 independently of the DUT
  always @(posedge clk) begin
    if (tx_word[19:16] == W_SYNC) t1 = count;
    if (rx_word[19:16] == W_SYNC_RET) t4 = count;
  end
  initial begin
    scount = cnt_t'($urandom);
    s_ofs_words = 0; got_ofs = 0; got_offset = 0;
    rx_word = mkword(W_IDLE, 0);
    repeat (3) @(posedge clk);
    rst = 0;
    for (int r = 0; r < 6; r++) begin
      longint ek, eofs;
      int lat;
      DOWN = 3 + $urandom_range(60); UP = DOWN + (r == 2 ? 1 : 0); TURN = 3 + $urandom_range(5);
      down_q.delete(); up_q.delete();
      got_ofs = 0;
      repeat (5) @(posedge clk);
      @(negedge clk) start = 1; @(negedge clk) start = 0;
      lat = 0;
      while (!done && lat < 3000) begin @(posedge clk); lat++; end
      repeat (DOWN + 10) @(posedge clk);
      ek   = longint'($signed((t4 - t1) - (t3 - t2)));
      eofs = longint'($signed(t2 - t1 - cnt_t'(ek >>> 1)));
      checks++; if (longint'($signed(k)) != ek) begin failures++; $display("FAIL K %0d exp %0d", $signed(k), ek); end
      checks++; if (k_odd != ek[0]) begin failures++; $display("FAIL k_odd"); end
      checks++; if (longint'($signed(offset)) != eofs) begin failures++; $display("FAIL offset %0d exp %0d", $signed(offset), eofs); end
      checks++; if (!got_ofs || got_offset != offset) begin failures++; $display("FAIL OFFSET packet"); end
      checks++; if (ek < DOWN + UP || ek > DOWN + UP + 4) begin failures++; $display("FAIL K vs delay %0d %0d", ek, DOWN + UP); end
    end
    // TS report is handed out
    @(negedge clk);
    s_tx.push_back(mkword(W_TS_REPORT, 0)); s_tx.push_back(mkword(W_PAYLOAD, 16'h0001)); s_tx.push_back(mkword(W_PAYLOAD, 16'h2345));
    fork
      begin wait (tsv); end
      begin repeat (300) @(posedge clk); end
    join_any
    #1;
    checks++; if (tsval != 32'h0001_2345) begin failures++; $display("FAIL ts report %h", tsval); end
    // timeout when nobody answers
    DOWN = 5000;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    fork
      begin wait (tmo); end
      begin repeat (2500) @(posedge clk); end
    join_any
    checks++; if (!tmo) begin failures++; $display("FAIL no timeout"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(200_000_000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
