`timescale 1ps/1fs
// Packet parser for the parallel transceiver interface (counterpart of link_tx).
//
// On a header word it records the coarse count of that cycle as the packet's arrival time
// and collects payload_words(type) PAYLOAD words into pkt_data (first word ends up most
// significant). When the packet is complete, pkt_valid pulses for one cycle with type,
// data and arrival time; a packet without payload is reported in the cycle after its
// header. IDLE words are ignored; a header arriving in the middle of a packet starts a
// new packet.
module link_rx
  import clksync_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  word_t       rx_word,
  input  cnt_t        count,
  output logic        pkt_valid,
  output wtype_e      pkt_type,
  output logic [63:0] pkt_data,
  output cnt_t        pkt_time
);

  wtype_e     t_in;
  logic [2:0] left;

  assign t_in = wtype_e'(rx_word[19:16]);

  always_ff @(posedge clk) begin
    if (rst) begin
      pkt_valid <= 1'b0;
      pkt_type  <= W_IDLE;
      pkt_data  <= '0;
      pkt_time  <= '0;
      left      <= '0;
    end else begin
      pkt_valid <= 1'b0;
      if (t_in == W_PAYLOAD) begin
        if (left != 3'd0) begin
          pkt_data <= {pkt_data[47:0], rx_word[15:0]};
          left     <= left - 3'd1;
          if (left == 3'd1) pkt_valid <= 1'b1;
        end
      end else if (t_in != W_IDLE) begin
        pkt_type <= t_in;
        pkt_time <= count;
        pkt_data <= '0;
        left     <= 3'(payload_words(t_in));
        if (payload_words(t_in) == 0) pkt_valid <= 1'b1;
      end
    end
  end

endmodule
