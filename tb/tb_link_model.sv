`timescale 1ps/1fs
// Behavioural model of one direction of the optical link, for testbenches: transceiver
// transmitter, SFP, optical circulator, fibre, circulator, SFP and transceiver receiver.
//
// The transmitter takes the sender's parallel word at each rising edge of its transmitted
// clock tx_clk (the PI-shifted main clock) and the word reaches the receiver's recovered
// clock delay_fs later; the recovered clock rec_clk is tx_clk delayed by the same amount
// (the clock is periodic, so only delay mod T_period is applied to it). The receiving
// board takes the word into its main clock domain at the first rising edge of rx_clk
// strictly after the word's arrival; if several words are due at one edge (after a phase
// jump) the newest is taken. Same wavelength in both directions means the two directions
// of a link use equal delays.
module tb_link_model
  import clksync_pkg::*;
(
  input  logic   tx_clk,
  input  word_t  tx_word,
  input  longint delay_fs,
  input  logic   rx_clk,
  output logic   rec_clk,
  output word_t  rx_word
);

  typedef struct { realtime t; word_t w; } item_t;
  item_t q[$];

  localparam longint PERIOD_FS = longint'(T_PERIOD_PS) * 1000;

  initial begin
    rec_clk = 1'b0;
    rx_word = mkword(W_IDLE, 16'h0);
  end

  always @(tx_clk) begin
    automatic logic v  = tx_clk;
    automatic real  dl = real'(delay_fs % PERIOD_FS) / 1000.0;
    fork
      begin
        #(dl) rec_clk = v;
      end
    join_none
  end

  always @(posedge tx_clk) q.push_back('{t: $realtime + real'(delay_fs) / 1000.0, w: tx_word});

  always @(posedge rx_clk) begin
    word_t w;
    logic  got;
    got = 1'b0;
    w   = mkword(W_IDLE, 16'h0);
    while (q.size() > 0 && q[0].t < $realtime) begin
      w   = q[0].w;
      got = 1'b1;
      void'(q.pop_front());
    end
    rx_word <= got ? w : mkword(W_IDLE, 16'h0);
  end

endmodule
