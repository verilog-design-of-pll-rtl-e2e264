// adpll_pkg: widths, calibration constants and types shared by the ADPLL blocks.
//
// The DCO and TDC delay figures are the typical-corner cell delays: one coarse DCO step is
// 181 ps, one fine step (a tri-state buffer switched onto the ring) is 28 ps, and the fastest
// DCO setting runs at 498 MHz (half period 1004 ps). The digital blocks use these numbers as
// calibration constants; the behavioural DCO and delay-line models default to them as well.
// Code widths (4-bit coarse code clamped to 0..8, 3-bit fine code) are chosen here so that
// the coarse range plus one span of fine steps covers the typical operating range
// (about 189 to 498 MHz); every time value is in picoseconds.
`timescale 1ps/1ps
package adpll_pkg;

  // typical-corner tuning steps and fastest half period, picoseconds
  localparam int unsigned COARSE_STEP_PS  = 181;
  localparam int unsigned FINE_STEP_PS    = 28;
  localparam int unsigned DCO_HALF_MIN_PS = 1004;

  // DCO control codes
  localparam int unsigned COARSE_W   = 4;
  localparam int unsigned COARSE_MAX = 8;   // highest coarse code used
  localparam int unsigned FINE_W     = 3;
  localparam int unsigned FINE_MAX   = 7;

  // feedback divider ratio and TDC result widths
  localparam int unsigned N_W    = 8;
  localparam int unsigned HPER_W = 16;

  typedef logic [COARSE_W-1:0] coarse_t;
  typedef logic [FINE_W-1:0]   fine_t;
  typedef logic [N_W-1:0]      ndiv_t;
  typedef logic [HPER_W-1:0]   hper_t;

  // DCO tuning word as the control block drives it
  typedef struct packed {
    coarse_t coarse;
    fine_t   fine;
  } dco_tune_t;

  // control state machine
  typedef enum logic [2:0] {
    ST_IDLE,    // loop off, DCO stopped
    ST_TDC_A,   // first reference cycle: coarse flash TDC samples the half period
    ST_TDC_B,   // second reference cycle: fine flash TDC samples the remainder
    ST_TRACK    // DCO running, fine code tracks UP/DN from the phase detector
  } ctrl_state_t;

endpackage
