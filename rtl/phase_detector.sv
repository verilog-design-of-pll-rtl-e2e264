// phase_detector: two-flip-flop phase/frequency detector.
//
// One D flip-flop is clocked by the reference CLK_REF and one by the divided DCO clock
// CLK_DIV; both have D tied high. Whichever edge comes first sets its flip-flop; when the
// second edge sets the other one, the AND of the two outputs resets both. UP_PD therefore is
// a pulse as long as the time by which CLK_REF leads CLK_DIV (DCO too slow), DN_PD a pulse as
// long as CLK_DIV leads (DCO too fast). The lagging output only shows a glitch as narrow as
// the reset path; the digital filter behind it removes it. The two-flip-flop structure is
// the design's; the AND reset and holding both outputs low while `en` is low are choices
// made here. Circuit warning: the reset through the AND of the outputs is the intended
// feedback of this detector, not an accidental loop.
`timescale 1ps/1ps
module phase_detector (
  input  logic clk_ref,
  input  logic clk_div,
  input  logic rst_n,
  input  logic en,       // detector active (DCO running)
  output logic up_pd,
  output logic dn_pd
);

  logic clr;
  assign clr = (up_pd & dn_pd) | ~rst_n | ~en;

  always_ff @(posedge clk_ref or posedge clr) begin
    if (clr) up_pd <= 1'b0;
    else     up_pd <= 1'b1;
  end

  always_ff @(posedge clk_div or posedge clr) begin
    if (clr) dn_pd <= 1'b0;
    else     dn_pd <= 1'b1;
  end

endmodule
