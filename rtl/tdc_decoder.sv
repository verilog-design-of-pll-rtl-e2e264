// tdc_decoder: converts the two flash TDC codes into the reference half period TDC_HPER.
//
// Each thermometer code is decoded as the number of ones below its first zero. Taps past the
// first zero are ignored, so an edge of the previous reference cycle that is still travelling
// down a line longer than the reference period (slow process corner) does not disturb the
// count; a bubble (a zero inside the run of ones) cuts the count at the bubble.
// The half period is then A*A_CELL_PS + B*B_CELL_PS in picoseconds, using the typical-corner
// cell delays as calibration constants, so the control block can compare it directly with the
// DCO tuning steps. Purely combinational. Leading-ones decoding and expressing the result in
// picoseconds are this design's choices; the decoder's place between TDC and control follows
// the block diagram.
`timescale 1ps/1ps
module tdc_decoder
  import adpll_pkg::*;
#(
  parameter int unsigned A_STAGES  = 200,
  parameter int unsigned B_STAGES  = 8,
  parameter int unsigned A_CELL_PS = COARSE_STEP_PS,
  parameter int unsigned B_CELL_PS = FINE_STEP_PS
) (
  input  logic [A_STAGES-1:0] flash_a,
  input  logic [B_STAGES-1:0] flash_b,
  output logic [$clog2(A_STAGES+1)-1:0] count_a,
  output logic [$clog2(B_STAGES+1)-1:0] count_b,
  output hper_t               tdc_hper
);

  always_comb begin
    logic run;
    count_a = '0;
    run = 1'b1;
    for (int i = 0; i < A_STAGES; i++) begin
      run = run & flash_a[i];
      count_a += {{($bits(count_a)-1){1'b0}}, run};
    end
    count_b = '0;
    run = 1'b1;
    for (int i = 0; i < B_STAGES; i++) begin
      run = run & flash_b[i];
      count_b += {{($bits(count_b)-1){1'b0}}, run};
    end
  end

  assign tdc_hper = HPER_W'(count_a * A_CELL_PS + count_b * B_CELL_PS);

endmodule
