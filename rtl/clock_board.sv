`timescale 1ps/1fs
// FPGA logic of one board of the clock distribution system.
//
// Every board holds the same parts. The coarse counter, clocked by the main clock, gives
// the coarse timestamp. The TDC module compares the main clock with the recovered clock
// (master: recovered behind main, the round trip Tm; slave: main behind recovered, the
// jitter cleaner delay Ts) and its readings are averaged over NAVG samples. The phase lock
// module measures the transmitted clock against the main clock with a second TDC module
// and steps the Tx phase interpolator so that this phase stays at PRESET_Q + adj.
// The master board adds the master side of the SYNC exchange and the phase
// synchronization controller, which supplies adj; the slave board adds the slave side of
// the SYNC exchange, corrects its coarse counter with the offset it receives and reports
// its averaged TDC reading to the master (adj is 0 there).
//
// External parts stay outside: the main clock comes from the oscillator and PLL (master)
// or the jitter cleaner (slave); rec_clk and rx_word come from the transceiver receiver;
// tx_clk and tx_word go to the transceiver transmitter, tx_clk being the PI-shifted
// clock produced by the behavioural PI model inside this module.
//
// Interface: all control inputs and status outputs are synchronous to main_clk. The
// master-only inputs are ignored on a slave board and the master-only outputs are 0.
module clock_board
  import clksync_pkg::*;
#(
  parameter bit          IS_MASTER     = 1'b1,
  parameter int unsigned NAVG          = 20000,
  parameter int unsigned NTAPS         = 660,
  parameter int unsigned TAP_PS        = 10,
  parameter int signed   PRESET_Q      = 1600 * (1 << PH_FRAC),  // 1.6 ns
  parameter int unsigned TXOUT_DIV     = 4,
  parameter longint      PI_INIT_FS    = 0,
  parameter int unsigned SYNC_TIMEOUT  = 65535
) (
  input  logic   main_clk,
  input  logic   rec_clk,
  input  logic   rst,
  output logic   tx_clk,
  output word_t  tx_word,
  input  word_t  rx_word,
  // master commands
  input  logic   sync_start,
  input  logic   cal_raw,
  input  logic   trim_en,
  input  logic   trim_dir,
  input  logic   cal_aligned,
  input  logic   phase_start,
  // status
  output cnt_t   count,
  output logic   tdc_valid,
  output phase_t tdc_mean,
  output logic   locked,
  output logic   sync_done,
  output cnt_t   k,
  output logic   k_odd,
  output cnt_t   coarse_offset,
  output logic   phase_done,
  output phase_t phase_target,
  output logic [15:0] pi_steps
);

  localparam int unsigned STEP_Q = (T_PERIOD_PS * (1 << PH_FRAC)) / (64 * TXOUT_DIV * WORD_W);

  // ---------------- coarse counter ----------------
  logic offset_load;
  cnt_t offset_in;
  coarse_counter u_cnt (.clk(main_clk), .rst, .offset_load, .offset(offset_in), .count);

  // ---------------- TDC: main clock vs recovered clock ----------------
  logic   tdc_pv;
  phase_t tdc_ph;
  cnt_t   tdc_coarse;
  tdc_module #(.NTAPS(NTAPS), .TAP_PS(TAP_PS)) u_tdc (
    .clk(main_clk), .rst,
    .hit_a(IS_MASTER ? main_clk : rec_clk),
    .hit_b(IS_MASTER ? rec_clk  : main_clk),
    .coarse_in(count), .phase_valid(tdc_pv), .phase(tdc_ph), .coarse(tdc_coarse));
  phase_averager #(.NAVG(NAVG)) u_avg (
    .clk(main_clk), .rst, .clear(1'b0), .sample_valid(tdc_pv), .sample(tdc_ph),
    .mean_valid(tdc_valid), .mean(tdc_mean));

  // ---------------- phase lock: main clock vs transmitted clock ----------------
  logic   pl_pv, pl_mv;
  phase_t pl_ph, pl_mean;
  cnt_t   pl_coarse;
  logic   pi_step_en, pi_step_dir, lock_eval;
  phase_t adj;
  tdc_module #(.NTAPS(NTAPS), .TAP_PS(TAP_PS)) u_pl_tdc (
    .clk(main_clk), .rst, .hit_a(main_clk), .hit_b(tx_clk),
    .coarse_in(count), .phase_valid(pl_pv), .phase(pl_ph), .coarse(pl_coarse));
  phase_averager #(.NAVG(NAVG)) u_pl_avg (
    .clk(main_clk), .rst, .clear(1'b0), .sample_valid(pl_pv), .sample(pl_ph),
    .mean_valid(pl_mv), .mean(pl_mean));
  phase_lock #(.STEP_Q(STEP_Q)) u_lock (
    .clk(main_clk), .rst, .enable(1'b1), .setpoint(phase_t'(PRESET_Q) + adj),
    .meas_valid(pl_mv), .meas(pl_mean), .step_en(pi_step_en), .step_dir(pi_step_dir),
    .locked, .eval_done(lock_eval), .steps_issued(pi_steps));
  tx_pi_model #(.TXOUT_DIV(TXOUT_DIV), .PAR_W(WORD_W), .INIT_PHASE_FS(PI_INIT_FS)) u_pi (
    .clk_in(main_clk), .step_en(pi_step_en), .step_dir(pi_step_dir),
    .txpippmstepsize(4'd1), .clk_out(tx_clk));

  // ---------------- role-specific logic ----------------
  if (IS_MASTER) begin : g_master
    logic   ts_valid;
    phase_t ts_value;
    cnt_t   n1, n2, n3, n4;
    logic   sm_busy, sm_timeout;
    logic   ps_busy, cal_done;
    phase_t tm3, ts3, tm3al;
    logic [15:0] corrections;

    sync_master #(.TIMEOUT(SYNC_TIMEOUT)) u_sync (
      .clk(main_clk), .rst, .start(sync_start), .count, .rx_word, .tx_word,
      .busy(sm_busy), .done(sync_done), .timeout(sm_timeout), .n1, .n2, .n3, .n4,
      .k, .k_odd, .offset(coarse_offset), .ts_valid, .ts_value);

    phase_sync_ctrl #(.STEP_Q(STEP_Q)) u_psync (
      .clk(main_clk), .rst, .tm_valid(tdc_valid), .tm(tdc_mean), .ts_valid, .ts(ts_value),
      .k_odd, .lock(locked), .lock_eval, .pi_step(pi_step_en),
      .cal_raw, .trim_en, .trim_dir, .cal_aligned, .sync_start(phase_start),
      .adj, .busy(ps_busy), .cal_done, .done(phase_done), .target(phase_target),
      .tm_3m(tm3), .ts_3m(ts3), .tm_3m_al(tm3al), .corrections);

    assign offset_load = 1'b0;
    assign offset_in   = '0;
  end else begin : g_slave
    cnt_t n2, n3;
    logic [15:0] syncs_seen;

    sync_slave u_sync (
      .clk(main_clk), .rst, .count, .rx_word, .tx_word,
      .ts_in_valid(tdc_valid), .ts_in(tdc_mean), .offset_load, .offset(offset_in),
      .n2, .n3, .syncs_seen);

    assign adj           = '0;
    assign sync_done     = 1'b0;
    assign k             = '0;
    assign k_odd         = 1'b0;
    assign coarse_offset = offset_in;
    assign phase_done    = 1'b0;
    assign phase_target  = '0;
  end

endmodule
