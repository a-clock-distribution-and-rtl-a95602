`timescale 1ps/1fs
// Testbench of sync_slave. The testbench sends SYNC packets and checks the returned
// packet: N2 must be the count of the cycle in which the SYNC header arrived and N3 the
// count of the cycle in which the returned header leaves, both observed here on the
// wires. An OFFSET packet must give one offset_load pulse with its value; an averaged TDC
// reading must come out as a TS_REPORT packet, after a pending returned SYNC packet.
module tb_sync_slave;
  import clksync_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, tsv = 0, ld;
  cnt_t count = 0, ofs, n2, n3, t2, t3;
  word_t rx_word, tx_word;
  phase_t ts = '0;
  logic [15:0] seen;
  logic [15:0] pl[$];
  wtype_e last_hdr;
  int nload = 0;
  always #3200 clk = ~clk;
  always @(posedge clk) count <= count + 1;
  sync_slave dut (.clk, .rst, .count, .rx_word, .tx_word, .ts_in_valid(tsv), .ts_in(ts),
                  .offset_load(ld), .offset(ofs), .n2, .n3, .syncs_seen(seen));
  // observe the wires (values before this edge)
  always @(posedge clk) begin
    if (rx_word[19:16] == W_SYNC) t2 = count;
    if (tx_word[19:16] == W_SYNC_RET || tx_word[19:16] == W_TS_REPORT) begin
      last_hdr = wtype_e'(tx_word[19:16]);
      if (tx_word[19:16] == W_SYNC_RET) t3 = count;
      pl.delete();
    end
    if (tx_word[19:16] == W_PAYLOAD) pl.push_back(tx_word[15:0]);
    if (ld) nload++;
  end
  task automatic send(input word_t w);
    @(negedge clk) rx_word = w;
  endtask
  initial begin
    rx_word = mkword(W_IDLE, 0);
    repeat (3) @(posedge clk);
    rst = 0;
    for (int r = 0; r < 5; r++) begin
      repeat ($urandom_range(3, 20)) send(mkword(W_IDLE, 0));
      send(mkword(W_SYNC, 0));
      send(mkword(W_IDLE, 0));
      repeat (10) @(posedge clk);
      checks++;
      if (last_hdr != W_SYNC_RET || pl.size() != 4 || {pl[0], pl[1]} != t2 || {pl[2], pl[3]} != t3) begin
        failures++; $display("FAIL returned SYNC: t2=%0d t3=%0d", t2, t3);
      end
      checks++; if (n2 != t2 || n3 != t3) begin failures++; $display("FAIL n2/n3"); end
      checks++; if (t3 - t2 > 4) begin failures++; $display("FAIL turnaround %0d", t3 - t2); end
    end
    checks++; if (seen != 5) begin failures++; $display("FAIL syncs_seen %0d", seen); end
    // offset
    send(mkword(W_OFFSET, 0)); send(mkword(W_PAYLOAD, 16'hdead)); send(mkword(W_PAYLOAD, 16'hbeef));
    send(mkword(W_IDLE, 0));
    repeat (4) @(posedge clk);
    checks++; if (nload != 1 || ofs != 32'hdeadbeef) begin failures++; $display("FAIL offset %h loads %0d", ofs, nload); end
    // TS report queued behind a returned SYNC
    send(mkword(W_SYNC, 0));
    @(negedge clk); tsv = 1; ts = 32'h0000_4e21;
    @(negedge clk); tsv = 0; rx_word = mkword(W_IDLE, 0);
    repeat (3) @(posedge clk);
    checks++; if (last_hdr != W_SYNC_RET) begin failures++; $display("FAIL priority"); end
    repeat (12) @(posedge clk);
    checks++;
    if (last_hdr != W_TS_REPORT || pl.size() != 2 || {pl[0], pl[1]} != 32'h0000_4e21) begin
      failures++; $display("FAIL TS report");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #(100_000_000); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
