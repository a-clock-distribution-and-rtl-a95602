`timescale 1ps/1fs
// Phase lock module: keeps the phase between the main clock and the transmitted clock at
// a preset value by stepping the Tx phase interpolator.
//
// It takes the averaged TDC reading of (transmitted clock - main clock). When a reading
// arrives and lock is enabled, the error setpoint - reading is wrapped into (-T/2, T/2]
// and converted into a whole number of PI steps (rounded). If that number is zero the
// module reports lock; otherwise it issues the steps, one step_en pulse every STEP_GAP
// cycles with step_dir giving the sign, and then ignores the next reading, which was
// partly taken before the steps, before it compares again. The module runs all the time,
// so it also corrects phase moves after start-up.
// Following the document: TDC-based measurement of main vs transmitted clock and
// correction with the Tx PI, online. The proportional one-shot correction, the rounding
// and STEP_GAP are this design's choices.
//
// Interface: eval_done pulses whenever a reading has been compared (locked then holds
// the outcome of that comparison); setpoint and meas in ps * 2**PH_FRAC; STEP_Q is one PI step in those units
// (1.25 ps = 20 units).
module phase_lock
  import clksync_pkg::*;
#(
  parameter int unsigned STEP_Q   = 20,
  parameter int unsigned STEP_GAP = 4
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   enable,
  input  phase_t setpoint,
  input  logic   meas_valid,
  input  phase_t meas,
  output logic   step_en,
  output logic   step_dir,
  output logic   locked,
  output logic   eval_done,
  output logic [15:0] steps_issued
);

  typedef enum logic [1:0] {S_WAIT, S_STEP, S_SETTLE} state_e;
  state_e state;

  phase_t err, nsteps_c;
  phase_t remaining;
  logic [$clog2(STEP_GAP+1)-1:0] gap;

  always_comb begin
    err = wrap_half(setpoint - meas);
    // round to nearest step
    if (err >= 0) nsteps_c = (err + phase_t'(STEP_Q / 2)) / phase_t'(STEP_Q);
    else          nsteps_c = -((-err + phase_t'(STEP_Q / 2)) / phase_t'(STEP_Q));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_WAIT;
      step_en      <= 1'b0;
      step_dir     <= 1'b0;
      locked       <= 1'b0;
      eval_done    <= 1'b0;
      remaining    <= '0;
      gap          <= '0;
      steps_issued <= '0;
    end else begin
      step_en   <= 1'b0;
      eval_done <= 1'b0;
      case (state)
        S_WAIT: if (meas_valid && enable) begin
          eval_done <= 1'b1;
          if (nsteps_c == 0) begin
            locked <= 1'b1;
          end else begin
            locked    <= 1'b0;
            step_dir  <= (nsteps_c > 0);
            remaining <= (nsteps_c > 0) ? nsteps_c : -nsteps_c;
            gap       <= '0;
            state     <= S_STEP;
          end
        end
        S_STEP: begin
          if (gap == '0) begin
            if (remaining == 0) begin
              state <= S_SETTLE;
            end else begin
              step_en      <= 1'b1;
              remaining    <= remaining - 1;
              steps_issued <= steps_issued + 1'b1;
              gap          <= ($clog2(STEP_GAP+1))'(STEP_GAP - 1);
            end
          end else begin
            gap <= gap - 1'b1;
          end
        end
        S_SETTLE: if (meas_valid) state <= S_WAIT;
        default: state <= S_WAIT;
      endcase
      if (!enable) begin
        state  <= S_WAIT;
        locked <= 1'b0;
      end
    end
  end

endmodule
