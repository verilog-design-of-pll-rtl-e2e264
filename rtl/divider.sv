// divider: divides the DCO clock by N_DIV to give CLK_DIV for the phase detector.
//
// A counter runs on the rising DCO edge from 0 to N-1. CLK_DIV rises on the edge where the
// counter wraps and falls N/2 edges later, so its period is exactly N DCO periods and its
// first rising edge comes on the N-th DCO rising edge after reset is released. The reset is
// held while the DCO is stopped, so CLK_DIV starts in step with the DCO. A ratio below 2 is
// treated as 2. The divide-by-N function is the design's; the counter and duty cycle are
// choices made here.
`timescale 1ps/1ps
module divider
  import adpll_pkg::*;
(
  input  logic  clk_dco,
  input  logic  rst_n,
  input  ndiv_t n_div,
  output logic  clk_div
);

  ndiv_t n_eff, half, cnt;

  assign n_eff = (n_div < ndiv_t'(2)) ? ndiv_t'(2) : n_div;
  assign half  = n_eff >> 1;

  always_ff @(posedge clk_dco or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_div <= 1'b0;
    end else if (cnt >= n_eff - 1'b1) begin
      cnt     <= '0;
      clk_div <= 1'b1;
    end else begin
      cnt     <= cnt + 1'b1;
      if (cnt + 1'b1 == half) clk_div <= 1'b0;
    end
  end

endmodule
