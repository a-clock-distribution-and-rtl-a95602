`timescale 1ps/1fs
// Packet sender for the parallel transceiver interface.
//
// A packet is a header word (type in [19:16]) followed by payload_words(type) PAYLOAD
// words, each carrying 16 bits of data, most significant first, taken from the low bits
// of payload. Between packets the sender emits IDLE words. tx_word is registered: a
// packet accepted (send high while busy low) in cycle c puts its header on tx_word in
// cycle c+1, with sof high in that same cycle; this fixed latency lets a caller know the
// coarse time at which its header leaves. busy is high while payload words remain.
module link_tx
  import clksync_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        send,
  input  wtype_e      ptype,
  input  logic [63:0] payload,
  output logic        busy,
  output logic        sof,
  output word_t       tx_word
);

  logic [63:0] sh;
  logic [2:0]  left;

  assign busy = (left != 3'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      sh      <= '0;
      left    <= '0;
      sof     <= 1'b0;
      tx_word <= mkword(W_IDLE, 16'h0);
    end else begin
      sof <= 1'b0;
      if (left != 3'd0) begin
        tx_word <= mkword(W_PAYLOAD, sh[63:48]);
        sh      <= {sh[47:0], 16'h0};
        left    <= left - 3'd1;
      end else if (send) begin
        tx_word <= mkword(ptype, 16'h0);
        sof     <= 1'b1;
        left    <= 3'(payload_words(ptype));
        sh      <= payload << (16 * (4 - payload_words(ptype)));
      end else begin
        tx_word <= mkword(W_IDLE, 16'h0);
      end
    end
  end

endmodule
