// tdc_delay_line: behavioural model of a chain of identical delay cells.
//
// Behavioural model, not synthesizable logic: in silicon this is a string of standard cells
// (inverter pairs or NAND gates) whose propagation delay sets the TDC resolution. Here each
// cell is a transport delay of STAGE_PS picoseconds. tap[0] is the input itself and tap[i]
// is the input delayed by i cells, so a rising edge entering at time t reaches tap[i] at
// t + i*STAGE_PS. The stage count and delay are this design's choices; the default cell delay
// is the typical 181 ps coarse step.
`timescale 1ps/1ps
module tdc_delay_line #(
  parameter int unsigned STAGES   = 160,
  parameter int unsigned STAGE_PS = 181
) (
  input  logic              din,
  output logic [STAGES:0]   tap
);

  assign tap[0] = din;

  for (genvar i = 1; i <= STAGES; i++) begin : g_cell
    initial tap[i] = 1'b0;
    always @(tap[i-1]) tap[i] <= #(STAGE_PS) tap[i-1];
  end

endmodule
