// adpll: all-digital phase-locked loop built from standard-cell style blocks.
//
// The loop multiplies the reference CLK_REF by N_DIV (20 MHz x 16 = 320 MHz in the reference
// configuration). When ENABLE rises, a two-level TDC measures half the reference period in two
// reference cycles; the control block turns that into a coarse (and starting fine) DCO code
// and starts the DCO on the next reference edge, so the output lands close to the target
// frequency at once. From then on the divided output CLK_DIV and CLK_REF meet in a
// two-flip-flop phase detector, a glitch filter turns its UP_PD/DN_PD pulses into one UP/DN
// decision per reference cycle, and the control block steps the fine code to hold phase.
//
//   CLK_REF -> tdc -> tdc_decoder -> TDC_HPER -> adpll_control -> COARSE/FINE -> dco -> CLK_DCO
//   CLK_REF, CLK_DIV -> phase_detector -> UP_PD/DN_PD -> digital_filter -> UP/DN -> adpll_control
//   CLK_DCO -> divider (/N_DIV) -> CLK_DIV
//
// The block set and their connections follow the design's block diagram; LOCKED and the
// exported state are additions for observation. The TDC lines use the same cells as the DCO
// (coarse and fine step), so at a slow or fast process corner the TDC count and the DCO step
// scale together and the starting code stays about right; the CELL_* parameters set that
// corner for the models. The DCO and the TDC delay lines are
// behavioural models, so this module simulates with timing but only its logic synthesizes.
`timescale 1ps/1ps
module adpll
  import adpll_pkg::*;
#(
  // cell delays of the behavioural DCO and TDC lines (the process corner); the digital
  // blocks keep the typical values of adpll_pkg as calibration constants
  parameter int unsigned CELL_HALF_MIN_PS = DCO_HALF_MIN_PS,
  parameter int unsigned CELL_COARSE_PS   = COARSE_STEP_PS,
  parameter int unsigned CELL_FINE_PS     = FINE_STEP_PS,
  parameter int unsigned TDC_A_STAGES = 200,
  parameter int unsigned TDC_B_STAGES = 8,
  parameter int unsigned GLITCH_CYC   = 2,
  parameter int unsigned SYNC_STAGES  = 2,
  parameter int unsigned INT_FRAC     = 2,
  parameter int unsigned PROP_STEPS   = 1,
  parameter int unsigned LOCK_CYC     = 32
) (
  input  logic        clk_ref,
  input  logic        rst_n,
  input  logic        enable,
  input  ndiv_t       n_div,
  output logic        clk_dco,
  output logic        clk_div,
  output dco_tune_t   tune,
  output hper_t       tdc_hper,
  output logic        dco_enable,
  output logic        locked,
  output ctrl_state_t state
);

  logic [TDC_A_STAGES-1:0] flash_a;
  logic [TDC_B_STAGES-1:0] flash_b;
  logic tdc_a_en, tdc_b_en;
  logic up_pd, dn_pd, up, dn;
  logic div_rst_n;

  tdc #(.A_STAGES(TDC_A_STAGES), .B_STAGES(TDC_B_STAGES),
        .A_CELL_PS(CELL_COARSE_PS), .B_CELL_PS(CELL_FINE_PS)) u_tdc (
    .clk_ref, .rst_n, .tdc_a_en, .tdc_b_en, .flash_a, .flash_b);

  tdc_decoder #(.A_STAGES(TDC_A_STAGES), .B_STAGES(TDC_B_STAGES)) u_tdc_decoder (
    .flash_a, .flash_b, .count_a(), .count_b(), .tdc_hper);

  adpll_control #(.INT_FRAC(INT_FRAC), .PROP_STEPS(PROP_STEPS),
                  .LOCK_CYC(LOCK_CYC)) u_control (
    .clk_ref, .rst_n, .enable, .n_div, .tdc_hper, .up, .dn,
    .tdc_a_en, .tdc_b_en, .dco_enable, .tune, .locked, .state);

  dco #(.HALF_MIN_PS(CELL_HALF_MIN_PS), .COARSE_PS(CELL_COARSE_PS), .FINE_PS(CELL_FINE_PS)) u_dco (
    .dco_enable, .coarse_tune(tune.coarse), .fine_tune(tune.fine), .clk_dco);

  assign div_rst_n = rst_n & dco_enable;

  divider u_divider (
    .clk_dco, .rst_n(div_rst_n), .n_div, .clk_div);

  phase_detector u_pd (
    .clk_ref, .clk_div, .rst_n, .en(dco_enable), .up_pd, .dn_pd);

  digital_filter #(.SYNC_STAGES(SYNC_STAGES), .GLITCH_CYC(GLITCH_CYC)) u_filter (
    .clk(clk_dco), .rst_n(div_rst_n), .clk_ref, .up_pd, .dn_pd, .up, .dn);

endmodule
