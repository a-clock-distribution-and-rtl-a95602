`timescale 1ps/1fs
// Behavioural model of the transceiver's Tx phase interpolator (PI) in stepping mode.
//
// Not synthesizable: the PI is a hard block inside the FPGA's serial transceiver. The
// model delays the reference (main) clock by a phase that each step request moves by
//   STEP = TXPIPPMSTEPSIZE / (64 * TXOUT_DIV) * T_period / PARALLEL_DATA_WIDTH,
// which with T_period = 6.4 ns, 20-bit words and TXOUT_DIV = 4 is 1.25 ps per unit of
// txpippmstepsize. The delay is kept in [0, T_period). INIT_PHASE_FS is the phase the PI
// comes up with after initialisation, which in the real part is not known in advance.
// The step formula and the 1.25 ps step follow the document; TXOUT_DIV = 4 is the value
// that makes the formula give 1.25 ps.
//
// Interface: step_en is sampled on the rising edge of clk_in; step_dir = 1 delays the
// transmitted clock further. clk_out is the transmitted (PI-shifted) clock.
module tx_pi_model
  import clksync_pkg::*;
#(
  parameter int unsigned TXOUT_DIV     = 4,
  parameter int unsigned PAR_W         = WORD_W,
  parameter longint      INIT_PHASE_FS = 0
) (
  input  logic       clk_in,
  input  logic       step_en,
  input  logic       step_dir,
  input  logic [3:0] txpippmstepsize,
  output logic       clk_out
);

  localparam longint PERIOD_FS = longint'(T_PERIOD_PS) * 1000;
  localparam longint UNIT_FS   = PERIOD_FS / longint'(64 * TXOUT_DIV * PAR_W);

  longint phase_fs = INIT_PHASE_FS % PERIOD_FS;
  initial clk_out = 1'b0;

  always @(posedge clk_in) begin
    if (step_en) begin
      if (step_dir) phase_fs <= (phase_fs + UNIT_FS * longint'(txpippmstepsize)) % PERIOD_FS;
      else phase_fs <= (phase_fs + PERIOD_FS - UNIT_FS * longint'(txpippmstepsize)) % PERIOD_FS;
    end
  end

  // transport delay: every edge of clk_in is reproduced phase_fs later
  always @(clk_in) begin
    automatic logic v  = clk_in;
    automatic real  dl = real'(phase_fs) / 1000.0;
    fork
      begin
        #(dl) clk_out = v;
      end
    join_none
  end

endmodule
