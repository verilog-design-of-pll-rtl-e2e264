// adpll_top: the ADPLL and the word-level phase monitor, side by side.
//
// The design holds two independent pieces: the clock-multiplying ADPLL (reference CLK_REF in,
// CLK_DCO = N_DIV x CLK_REF out) and a word-level phase error monitor with its own clock.
// They share no signals; each keeps its own ports here. The ADPLL contains behavioural DCO and
// delay-line models and needs a simulator with timing.
`timescale 1ps/1ps
module adpll_top
  import adpll_pkg::*;
(
  // ADPLL
  input  logic          clk_ref,
  input  logic          rst_n,
  input  logic          enable,
  input  ndiv_t         n_div,
  output logic          clk_dco,
  output logic          clk_div,
  output dco_tune_t     tune,
  output hper_t         tdc_hper,
  output logic          dco_enable,
  output logic          pll_locked,
  output ctrl_state_t   state,
  // word-level phase monitor
  input  logic          clk,
  input  logic          reset,
  input  logic          rst_adc,
  input  logic [31:0]   ref_word,
  input  logic [31:0]   feedback_word,
  output logic signed [31:0] phase_error,
  output logic [31:0]   phase_error_abs,
  output logic          locked
);

  adpll u_adpll (
    .clk_ref, .rst_n, .enable, .n_div, .clk_dco, .clk_div, .tune, .tdc_hper,
    .dco_enable, .locked(pll_locked), .state);

  phase_locked_loop u_monitor (
    .clk, .reset, .rst_adc, .ref_word, .feedback_word,
    .phase_error, .phase_error_abs, .locked);

endmodule
