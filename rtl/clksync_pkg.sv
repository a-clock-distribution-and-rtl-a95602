`timescale 1ps/1fs
// Shared constants and types of the clock distribution and synchronization design.
//
// All boards run a 156.25 MHz main clock (6.4 ns period) and exchange 20-bit parallel
// words with their serial transceiver (3.125 Gb/s line rate, 20 bits per word clock).
// Phases are carried in fixed point: PH_FRAC fractional bits of one picosecond, so one
// Tx phase-interpolator step of 1.25 ps is exactly 20 units.
//
// Link words: the transceiver's line coding and word alignment are outside this design.
// Each 20-bit word carries a 4-bit type in [19:16] and 16 payload bits in [15:0]. A
// 32-bit value (timestamp or phase) follows its header as two PAYLOAD words, high half
// first. This word format is this design's own choice.
package clksync_pkg;

  localparam int unsigned T_PERIOD_PS  = 6400;   // main clock period
  localparam int unsigned WORD_W       = 20;     // parallel data width into the PISO
  localparam int unsigned CNT_W        = 32;     // coarse counter width
  localparam int unsigned PH_FRAC      = 4;      // fractional bits of a phase in ps
  localparam int unsigned PH_W         = 32;     // width of a signed fixed-point phase
  localparam int signed   T_PERIOD_Q   = T_PERIOD_PS * (1 << PH_FRAC);

  typedef logic [CNT_W-1:0]        cnt_t;
  typedef logic signed [PH_W-1:0]  phase_t;   // ps * 2**PH_FRAC
  typedef logic [WORD_W-1:0]       word_t;

  typedef enum logic [3:0] {
    W_IDLE      = 4'h0,
    W_SYNC      = 4'h1,   // master -> slave: SYNC packet, no payload
    W_SYNC_RET  = 4'h2,   // slave -> master: returned SYNC packet, payload N2 then N3
    W_OFFSET    = 4'h3,   // master -> slave: coarse offset, payload offset
    W_TS_REPORT = 4'h4,   // slave -> master: averaged slave TDC reading, payload phase
    W_PAYLOAD   = 4'h5    // 16 payload bits
  } wtype_e;

  function automatic word_t mkword(wtype_e t, logic [15:0] d);
    return {t, d};
  endfunction

  // Number of PAYLOAD words that follow a header of the given type.
  function automatic int unsigned payload_words(wtype_e t);
    case (t)
      W_SYNC_RET:  return 4;
      W_OFFSET:    return 2;
      W_TS_REPORT: return 2;
      default:     return 0;
    endcase
  endfunction

  // Wrap a phase difference into (-T/2, T/2].
  function automatic phase_t wrap_half(phase_t d);
    phase_t r;
    r = d % T_PERIOD_Q;
    if (r > T_PERIOD_Q / 2) r = r - T_PERIOD_Q;
    else if (r <= -(T_PERIOD_Q / 2)) r = r + T_PERIOD_Q;
    return r;
  endfunction

  // Reduce a phase into [0, T).
  function automatic phase_t wrap_period(phase_t d);
    phase_t r;
    r = d % T_PERIOD_Q;
    if (r < 0) r = r + T_PERIOD_Q;
    return r;
  endfunction

endpackage
