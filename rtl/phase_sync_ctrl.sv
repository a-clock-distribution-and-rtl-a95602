`timescale 1ps/1fs
// Phase synchronization controller of the master board.
//
// The master TDC reads Tm, the phase of the recovered clock behind the main clock, which
// covers the whole round trip; the slave TDC reads Ts, the delay its jitter cleaner adds,
// reported over the link. With a short reference fibre (3 m) the operator first captures
// Tm_3m and Ts_3m at the default PI phase (cal_raw), then trims the master Tx PI (trim_en/trim_dir, one PI step
// each) until an oscilloscope shows the two main clocks aligned, and captures the master
// TDC reading of that state, Tm'_3m (cal_aligned). With the real fibre, sync_start
// returns the PI to its default phase, waits for fresh Tm_x and Ts_x and computes
//   target = Tm'_3m + (Tm_x - Ts_x)/2 - (Tm_3m - Ts_3m)/2          (mod T_period)
// where a master reading is first extended by one period when the coarse exchange found
// K odd (the round trip then spans an odd number of periods). It then moves the master
// Tx PI, through the setpoint of the phase lock module (adj), until the master TDC reads
// the target within TOL; done then stays high.
//
// A reading is used only if it is "clean": the phase lock has compared at least once
// since adj last changed, reports lock, and no PI step happened during the averaging
// window of that reading.
// The calibration procedure and the target formula follow the document; the extension of
// both master readings by their own K parity, the iteration and TOL are this design's.
//
// Reset does not clear the calibration registers (Tm_3m, Ts_3m, Tm'_3m, the K parity and
// cal_done): the calibration is done once, and after a restart of the boards a SYNC
// exchange and sync_start realign the clocks with the stored values. They hold random
// values from power-up until the first calibration, and cal_done is only meaningful
// after one; nothing in the controller depends on it.
//
// Phases in ps * 2**PH_FRAC. adj is added to the phase lock module's preset.
module phase_sync_ctrl
  import clksync_pkg::*;
#(
  parameter int unsigned STEP_Q = 20,   // one PI step, 1.25 ps
  parameter int unsigned TOL    = 10    // 0.625 ps
) (
  input  logic   clk,
  input  logic   rst,
  // measurements
  input  logic   tm_valid,
  input  phase_t tm,
  input  logic   ts_valid,
  input  phase_t ts,
  input  logic   k_odd,
  // phase lock status
  input  logic   lock,
  input  logic   lock_eval,
  input  logic   pi_step,
  // commands
  input  logic   cal_raw,
  input  logic   trim_en,
  input  logic   trim_dir,
  input  logic   cal_aligned,
  input  logic   sync_start,
  // results
  output phase_t adj,
  output logic   busy,
  output logic   cal_done,
  output logic   done,
  output phase_t target,
  output phase_t tm_3m, ts_3m, tm_3m_al,
  output logic [15:0] corrections
);

  typedef enum logic [2:0] {P_IDLE, P_CAP_RAW, P_CAP_AL, P_MEAS_X, P_ADJUST} pstate_e;
  pstate_e state;

  logic   k3_odd;
  logic   have_ts;
  phase_t ts_last;
  logic   evaluated, dirty;
  logic   clean;
  phase_t tm_full, tm3_full, err;

  assign busy  = (state != P_IDLE);
  assign clean = tm_valid && !dirty && evaluated && lock;

  always_comb begin
    tm_full  = tm + (k_odd ? T_PERIOD_Q : phase_t'(0));
    tm3_full = tm_3m + (k3_odd ? T_PERIOD_Q : phase_t'(0));
    err      = wrap_half(target - tm);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= P_IDLE;
      adj         <= '0;
      done        <= 1'b0;
      target      <= '0;
      have_ts     <= 1'b0;
      ts_last     <= '0;
      evaluated   <= 1'b0;
      dirty       <= 1'b1;
      corrections <= '0;
    end else begin
      // cleanliness bookkeeping
      if (lock_eval) evaluated <= 1'b1;
      if (tm_valid)  dirty <= 1'b0;
      if (pi_step)   dirty <= 1'b1;
      if (ts_valid) begin
        ts_last <= ts;
        have_ts <= 1'b1;
      end

      case (state)
        P_IDLE: begin
          if (trim_en) begin
            adj       <= trim_dir ? adj + phase_t'(STEP_Q) : adj - phase_t'(STEP_Q);
            evaluated <= 1'b0;
            dirty     <= 1'b1;
          end else if (cal_raw) begin
            adj       <= '0;          // raw values are taken at the default PI phase
            evaluated <= 1'b0;
            dirty     <= 1'b1;
            cal_done  <= 1'b0;
            state     <= P_CAP_RAW;
          end else if (cal_aligned) begin
            state <= P_CAP_AL;
          end else if (sync_start) begin
            adj         <= '0;
            evaluated   <= 1'b0;
            dirty       <= 1'b1;
            done        <= 1'b0;
            corrections <= '0;
            state       <= P_MEAS_X;
          end
        end
        P_CAP_RAW: if (clean && have_ts) begin
          tm_3m  <= tm;
          ts_3m  <= ts_last;
          k3_odd <= k_odd;
          state  <= P_IDLE;
        end
        P_CAP_AL: if (clean) begin
          tm_3m_al <= tm;
          cal_done <= 1'b1;
          state    <= P_IDLE;
        end
        P_MEAS_X: if (clean && have_ts) begin
          target <= wrap_period(tm_3m_al + ((tm_full - ts_last) >>> 1)
                                         - ((tm3_full - ts_3m) >>> 1));
          state  <= P_ADJUST;
        end
        P_ADJUST: if (clean) begin
          if (err <= phase_t'(TOL) && err >= -phase_t'(TOL)) begin
            done  <= 1'b1;
            state <= P_IDLE;
          end else begin
            adj         <= adj + err;
            evaluated   <= 1'b0;
            dirty       <= 1'b1;
            corrections <= corrections + 1'b1;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

endmodule
