`timescale 1ps/1fs
// Master side of the coarse timestamp synchronization (SYNC packet exchange).
//
// On start the master sends a SYNC packet and records the coarse count N1 of the cycle in
// which its header leaves. The slave returns a SYNC packet that carries its own arrival
// and departure counts N2 and N3; the master records N4 when that header arrives. Then
//   K      = (N4 - N1) - (N3 - N2)            round-trip delay in clock periods
//   offset = N2 - N1 - floor(K / 2)           slave count minus master count
// and the master sends the offset to the slave in an OFFSET packet, which the slave
// subtracts from its counter. k_odd tells the phase synchronization that the round-trip
// phase has passed a whole period, in which case one period is added to the master TDC
// reading. If no answer comes within TIMEOUT cycles the exchange is abandoned (timeout
// pulses) and may be started again.
// The exchange and the formulas follow the document; carrying N2/N3 in the returned
// packet, the OFFSET packet and the timeout are this design's choices.
//
// The parser also hands out the slave's averaged TDC reading (TS_REPORT packets) as
// ts_value with a ts_valid pulse.
module sync_master
  import clksync_pkg::*;
#(
  parameter int unsigned TIMEOUT = 65535
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  cnt_t   count,
  input  word_t  rx_word,
  output word_t  tx_word,
  output logic   busy,
  output logic   done,
  output logic   timeout,
  output cnt_t   n1, n2, n3, n4,
  output cnt_t   k,
  output logic   k_odd,
  output cnt_t   offset,
  output logic   ts_valid,
  output phase_t ts_value
);

  typedef enum logic [1:0] {M_IDLE, M_WAIT, M_CALC, M_SEND_OFS} mstate_e;
  mstate_e state;

  logic        tx_send, tx_busy, tx_sof;
  wtype_e      tx_type;
  logic [63:0] tx_payload;
  logic        pkt_valid;
  wtype_e      pkt_type;
  logic [63:0] pkt_data;
  cnt_t        pkt_time;
  logic [$clog2(TIMEOUT+1)-1:0] wait_cnt;
  cnt_t        k_c;

  link_tx u_tx (.clk, .rst, .send(tx_send), .ptype(tx_type), .payload(tx_payload),
                .busy(tx_busy), .sof(tx_sof), .tx_word);
  link_rx u_rx (.clk, .rst, .rx_word, .count, .pkt_valid, .pkt_type, .pkt_data, .pkt_time);

  assign busy = (state != M_IDLE);
  assign k_c  = (n4 - n1) - (n3 - n2);

  always_comb begin
    tx_send    = 1'b0;
    tx_type    = W_SYNC;
    tx_payload = '0;
    if (state == M_IDLE && start && !tx_busy) begin
      tx_send = 1'b1;
    end else if (state == M_SEND_OFS && !tx_busy) begin
      tx_send    = 1'b1;
      tx_type    = W_OFFSET;
      tx_payload = {32'h0, offset};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= M_IDLE;
      done     <= 1'b0;
      timeout  <= 1'b0;
      n1 <= '0; n2 <= '0; n3 <= '0; n4 <= '0;
      k        <= '0;
      k_odd    <= 1'b0;
      offset   <= '0;
      wait_cnt <= '0;
      ts_valid <= 1'b0;
      ts_value <= '0;
    end else begin
      timeout  <= 1'b0;
      ts_valid <= 1'b0;
      case (state)
        M_IDLE: if (tx_send) begin
          n1       <= count + 1'b1;   // header is on tx_word in the next cycle
          done     <= 1'b0;
          wait_cnt <= '0;
          state    <= M_WAIT;
        end
        M_WAIT: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (pkt_valid && pkt_type == W_SYNC_RET) begin
            n4    <= pkt_time;
            n2    <= pkt_data[63:32];
            n3    <= pkt_data[31:0];
            state <= M_CALC;
          end else if (wait_cnt == ($clog2(TIMEOUT+1))'(TIMEOUT)) begin
            timeout <= 1'b1;
            state   <= M_IDLE;
          end
        end
        M_CALC: begin
          k      <= k_c;
          k_odd  <= k_c[0];
          offset <= n2 - n1 - cnt_t'($signed(k_c) >>> 1);
          state  <= M_SEND_OFS;
        end
        M_SEND_OFS: if (tx_send) begin
          done  <= 1'b1;
          state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
      if (pkt_valid && pkt_type == W_TS_REPORT) begin
        ts_valid <= 1'b1;
        ts_value <= phase_t'(pkt_data[31:0]);
      end
    end
  end

  logic unused_sof;
  assign unused_sof = tx_sof;

endmodule
