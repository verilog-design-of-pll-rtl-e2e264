// dco: behavioural model of the digitally controlled oscillator.
//
// Behavioural model, not synthesizable logic. The oscillator is a ring of standard cells:
// a NAND gate closes the ring and stops it while DCO_ENABLE is low, the coarse code selects
// how many coarse delay cells are in the ring, and the fine code switches tri-state buffers
// onto the ring to add load. The model reproduces that as a half period of
//   HALF_MIN_PS + min(coarse, COARSE_MAX) * COARSE_PS + fine * FINE_PS   picoseconds,
// with the typical-corner values 1004, 181 and 28 ps (498 MHz down to about 189 MHz). The
// tuning steps and the fastest setting follow the design's typical-case figures; the code
// widths and the exact ring make-up are choices made here. Pass the best- or worst-case step
// values as parameters to model the other corners. The output is low while disabled; the
// first rising edge comes one half period after enable, and a new code takes effect at the
// next output transition.
`timescale 1ps/1ps
module dco
  import adpll_pkg::*;
#(
  parameter int unsigned HALF_MIN_PS = DCO_HALF_MIN_PS,
  parameter int unsigned COARSE_PS   = COARSE_STEP_PS,
  parameter int unsigned FINE_PS     = FINE_STEP_PS
) (
  input  logic    dco_enable,
  input  coarse_t coarse_tune,
  input  fine_t   fine_tune,
  output logic    clk_dco
);

  int unsigned half_ps;

  always_comb begin
    half_ps = HALF_MIN_PS + FINE_PS * int'(fine_tune)
            + COARSE_PS * ((int'(coarse_tune) > COARSE_MAX) ? COARSE_MAX : int'(coarse_tune));
  end

  initial clk_dco = 1'b0;

  always begin
    if (!dco_enable) begin
      clk_dco = 1'b0;
      @(posedge dco_enable);
    end else begin
      #(half_ps);
      if (dco_enable) clk_dco = ~clk_dco;
    end
  end

endmodule
