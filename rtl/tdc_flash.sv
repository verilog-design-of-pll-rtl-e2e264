// tdc_flash: flash TDC register bank (one of FLASH TDC A / FLASH TDC B).
//
// A row of D flip-flops samples the taps of a delay line at the falling edge of the
// reference clock, i.e. at the end of the reference high phase that started the edge running
// down the line. Taps the edge has already reached read 1, the others 0, so the register
// holds a thermometer code whose length is the high-phase duration in cell delays. Sampling
// happens only in a reference cycle where `en` is high; otherwise the code is held for the
// decoder. Sampling on the falling reference edge and the asynchronous active-low reset are
// this design's choices.
`timescale 1ps/1ps
module tdc_flash #(
  parameter int unsigned STAGES = 160
) (
  input  logic              clk_ref,   // stop edge: falling edge of the reference
  input  logic              rst_n,
  input  logic              en,        // sample in this reference cycle
  input  logic [STAGES:1]   tap,       // delay-line taps 1..STAGES (tap 0 is the start edge)
  output logic [STAGES-1:0] therm      // therm[i-1] = tap[i] at the stop edge
);

  always_ff @(negedge clk_ref or negedge rst_n) begin
    if (!rst_n)  therm <= '0;
    else if (en) therm <= tap;
  end

endmodule
