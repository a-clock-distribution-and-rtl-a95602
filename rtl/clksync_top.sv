`timescale 1ps/1fs
// Top level: a master board and a slave board of the clock distribution system.
//
// The master's main clock is distributed to the slave over one bidirectional optical
// link; the slave recovers it, cleans it and uses it as its own main clock, and sends it
// back, so that the master can measure the round trip and align the two main clocks to
// within a few picoseconds. Everything between the two boards is analog or a hard
// transceiver block and stays outside this top: the serialiser/deserialiser with clock
// recovery, SFP modules, optical circulators and fibre, and the slave's jitter cleaner.
// Their signals are the ports: each board's transmitted clock and parallel words go out,
// each board's recovered clock and received words come in, and the slave's main clock
// comes in from its jitter cleaner.
//
// Operation, driven through the master's command inputs (all synchronous to m_main_clk):
// sync_start runs the SYNC exchange that aligns the coarse counters; with a short
// reference fibre cal_raw, trim_en/trim_dir and cal_aligned perform the one-time
// calibration; with the operating fibre phase_start aligns the phases.
module clksync_top
  import clksync_pkg::*;
#(
  parameter int unsigned NAVG     = 20000,
  parameter int unsigned NTAPS    = 660,
  parameter int unsigned TAP_PS   = 10,
  parameter longint      M_PI_INIT_FS = 0,
  parameter longint      S_PI_INIT_FS = 0
) (
  input  logic   rst,
  // master board
  input  logic   m_main_clk,
  input  logic   m_rec_clk,
  output logic   m_tx_clk,
  output word_t  m_tx_word,
  input  word_t  m_rx_word,
  input  logic   m_sync_start,
  input  logic   m_cal_raw,
  input  logic   m_trim_en,
  input  logic   m_trim_dir,
  input  logic   m_cal_aligned,
  input  logic   m_phase_start,
  output cnt_t   m_count,
  output phase_t m_tdc_mean,
  output logic   m_tdc_valid,
  output logic   m_locked,
  output logic   m_sync_done,
  output cnt_t   m_k,
  output logic   m_k_odd,
  output cnt_t   m_coarse_offset,
  output logic   m_phase_done,
  output phase_t m_phase_target,
  output logic [15:0] m_pi_steps,
  // slave board
  input  logic   s_main_clk,
  input  logic   s_rec_clk,
  output logic   s_tx_clk,
  output word_t  s_tx_word,
  input  word_t  s_rx_word,
  output cnt_t   s_count,
  output phase_t s_tdc_mean,
  output logic   s_tdc_valid,
  output logic   s_locked,
  output logic [15:0] s_pi_steps
);

  clock_board #(.IS_MASTER(1'b1), .NAVG(NAVG), .NTAPS(NTAPS), .TAP_PS(TAP_PS),
                .PI_INIT_FS(M_PI_INIT_FS)) u_master (
    .main_clk(m_main_clk), .rec_clk(m_rec_clk), .rst, .tx_clk(m_tx_clk),
    .tx_word(m_tx_word), .rx_word(m_rx_word),
    .sync_start(m_sync_start), .cal_raw(m_cal_raw), .trim_en(m_trim_en),
    .trim_dir(m_trim_dir), .cal_aligned(m_cal_aligned), .phase_start(m_phase_start),
    .count(m_count), .tdc_valid(m_tdc_valid), .tdc_mean(m_tdc_mean), .locked(m_locked),
    .sync_done(m_sync_done), .k(m_k), .k_odd(m_k_odd), .coarse_offset(m_coarse_offset),
    .phase_done(m_phase_done), .phase_target(m_phase_target), .pi_steps(m_pi_steps));

  logic   s_sync_done_nc, s_k_odd_nc, s_phase_done_nc;
  cnt_t   s_k_nc, s_offset_nc;
  phase_t s_target_nc;

  clock_board #(.IS_MASTER(1'b0), .NAVG(NAVG), .NTAPS(NTAPS), .TAP_PS(TAP_PS),
                .PI_INIT_FS(S_PI_INIT_FS)) u_slave (
    .main_clk(s_main_clk), .rec_clk(s_rec_clk), .rst, .tx_clk(s_tx_clk),
    .tx_word(s_tx_word), .rx_word(s_rx_word),
    .sync_start(1'b0), .cal_raw(1'b0), .trim_en(1'b0), .trim_dir(1'b0),
    .cal_aligned(1'b0), .phase_start(1'b0),
    .count(s_count), .tdc_valid(s_tdc_valid), .tdc_mean(s_tdc_mean), .locked(s_locked),
    .sync_done(s_sync_done_nc), .k(s_k_nc), .k_odd(s_k_odd_nc),
    .coarse_offset(s_offset_nc), .phase_done(s_phase_done_nc),
    .phase_target(s_target_nc), .pi_steps(s_pi_steps));

endmodule
