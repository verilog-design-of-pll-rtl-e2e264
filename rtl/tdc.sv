// tdc: two-level time-to-digital converter that measures half the reference period.
//
// The ADPLL needs the length of the reference high phase before it starts the DCO. A coarse
// delay line of A_STAGES cells (typical 181 ps, the DCO coarse step) carries each reference
// rising edge; in the first measuring cycle (tdc_a_en) flash register A samples its taps at
// the falling reference edge, giving a thermometer code of floor(Thigh / coarse cell) ones.
// In the second cycle (tdc_b_en) the tap at the end of that thermometer run, i.e. the
// reference edge delayed by A coarse cells, starts a short fine line of B_STAGES cells
// (typical 28 ps, the DCO fine step); flash register B samples it at the next falling
// reference edge and so measures the remainder Thigh - A*coarse in fine cells. Both codes stay
// in their registers for the decoder. The two levels and the two reference cycles follow the
// design's description; the tap selection by the thermometer edge and the cell counts are
// this design's choices. The delay lines are behavioural models, the rest is logic.
// Only the leading run of ones counts: at a slow corner the coarse line (200 cells) can be
// longer than a reference period, and an edge of the previous cycle may still be travelling
// further down it at the sampling instant. The high phase must be shorter than the line.
`timescale 1ps/1ps
module tdc #(
  parameter int unsigned A_STAGES = 200,   // coarse cells: 200 x 181 ps covers up to 36.2 ns
  parameter int unsigned B_STAGES = 8,     // fine cells: 8 x 28 ps covers one coarse cell
  parameter int unsigned A_CELL_PS = 181,
  parameter int unsigned B_CELL_PS = 28
) (
  input  logic                clk_ref,
  input  logic                rst_n,
  input  logic                tdc_a_en,
  input  logic                tdc_b_en,
  output logic [A_STAGES-1:0] flash_a,     // coarse thermometer code
  output logic [B_STAGES-1:0] flash_b      // fine thermometer code
);

  logic [A_STAGES:0] tap_a;
  logic [B_STAGES:0] tap_b;
  logic [A_STAGES:0] sel;      // one-hot: which coarse tap starts the fine line
  logic              fine_start;

  tdc_delay_line #(.STAGES(A_STAGES), .STAGE_PS(A_CELL_PS)) u_line_a (
    .din(clk_ref), .tap(tap_a));

  tdc_flash #(.STAGES(A_STAGES)) u_flash_a (
    .clk_ref(clk_ref), .rst_n(rst_n), .en(tdc_a_en), .tap(tap_a[A_STAGES:1]), .therm(flash_a));

  // end of the leading run of ones in flash A: sel[k] = 1 for k = length of that run
  always_comb begin
    logic run;
    run = 1'b1;
    for (int k = 0; k < A_STAGES; k++) begin
      sel[k] = run & ~flash_a[k];
      run    = run & flash_a[k];
    end
    sel[A_STAGES] = run;
  end

  assign fine_start = |(sel & tap_a);

  tdc_delay_line #(.STAGES(B_STAGES), .STAGE_PS(B_CELL_PS)) u_line_b (
    .din(fine_start), .tap(tap_b));

  tdc_flash #(.STAGES(B_STAGES)) u_flash_b (
    .clk_ref(clk_ref), .rst_n(rst_n), .en(tdc_b_en), .tap(tap_b[B_STAGES:1]), .therm(flash_b));

endmodule
