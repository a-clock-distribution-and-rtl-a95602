`timescale 1ps/1fs
// Slave side of the coarse timestamp synchronization (SYNC packet exchange).
//
// When a SYNC packet arrives, the slave records the coarse count N2 of the cycle in which
// its header arrived and sends the SYNC packet back as soon as its transmitter is free,
// recording N3, the count of the cycle in which the returned header leaves (the sender's
// fixed one-cycle latency makes that count + 1 at the time of sending). The returned
// packet carries N2 and N3 so that the master can form K and the offset. When the OFFSET
// packet arrives, offset_load pulses for one cycle with offset, for the coarse counter.
// Each new averaged reading of the slave TDC (ts_in_valid) is reported to the master in a
// TS_REPORT packet; a returned SYNC packet has priority over a report.
// The recording of N2 and N3 follows the document; the packet contents and the reporting
// of the slave TDC over the link are this design's choices.
module sync_slave
  import clksync_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  cnt_t   count,
  input  word_t  rx_word,
  output word_t  tx_word,
  input  logic   ts_in_valid,
  input  phase_t ts_in,
  output logic   offset_load,
  output cnt_t   offset,
  output cnt_t   n2,
  output cnt_t   n3,
  output logic [15:0] syncs_seen
);

  logic        tx_send, tx_busy, tx_sof;
  wtype_e      tx_type;
  logic [63:0] tx_payload;
  logic        pkt_valid;
  wtype_e      pkt_type;
  logic [63:0] pkt_data;
  cnt_t        pkt_time;
  logic        pend_ret, pend_ts;
  phase_t      ts_hold;

  link_tx u_tx (.clk, .rst, .send(tx_send), .ptype(tx_type), .payload(tx_payload),
                .busy(tx_busy), .sof(tx_sof), .tx_word);
  link_rx u_rx (.clk, .rst, .rx_word, .count, .pkt_valid, .pkt_type, .pkt_data, .pkt_time);

  always_comb begin
    tx_send    = 1'b0;
    tx_type    = W_SYNC_RET;
    tx_payload = '0;
    if (!tx_busy) begin
      if (pend_ret) begin
        tx_send    = 1'b1;
        tx_payload = {n2, count + 1'b1};
      end else if (pend_ts) begin
        tx_send    = 1'b1;
        tx_type    = W_TS_REPORT;
        tx_payload = {32'h0, ts_hold};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_ret    <= 1'b0;
      pend_ts     <= 1'b0;
      ts_hold     <= '0;
      offset_load <= 1'b0;
      offset      <= '0;
      n2          <= '0;
      n3          <= '0;
      syncs_seen  <= '0;
    end else begin
      offset_load <= 1'b0;
      if (tx_send && pend_ret) begin
        pend_ret <= 1'b0;
        n3       <= count + 1'b1;
      end else if (tx_send && pend_ts) begin
        pend_ts <= 1'b0;
      end
      if (ts_in_valid) begin
        ts_hold <= ts_in;
        pend_ts <= 1'b1;
      end
      if (pkt_valid) begin
        case (pkt_type)
          W_SYNC: begin
            n2         <= pkt_time;
            pend_ret   <= 1'b1;
            syncs_seen <= syncs_seen + 1'b1;
          end
          W_OFFSET: begin
            offset_load <= 1'b1;
            offset      <= pkt_data[31:0];
          end
          default: ;
        endcase
      end
    end
  end

  logic unused_sof;
  assign unused_sof = tx_sof;

endmodule
