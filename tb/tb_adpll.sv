// tb_adpll: the ADPLL alone at its default parameters, in the reference configuration
// (20 MHz reference, N = 16) and at N = 20 (400 MHz). After ENABLE the DCO must start two
// reference cycles later, and after settling the DCO must make N edges per reference period
// on average (checked over 32 periods), CLK_DIV must stay within 8 ns of CLK_REF and LOCKED
// must be high.
`timescale 1ps/1ps
module tb_adpll;
  import adpll_pkg::*;
  localparam int REF_HALF = 25000;
  logic clk_ref = 1'b0, rst_n = 1'b1, enable = 1'b0;
  ndiv_t n_div = 8'd16;
  logic clk_dco, clk_div, dco_enable, locked;
  dco_tune_t tune;
  hper_t tdc_hper;
  ctrl_state_t state;
  int checks = 0, failures = 0;
  int dco_edges, max_err;
  time t_ref;

  initial #1 rst_n = 1'b0;          // an edge, so the asynchronous reset acts

  adpll dut (.*);

  always #(REF_HALF) clk_ref = ~clk_ref;
  always @(posedge clk_dco) dco_edges++;
  always @(posedge clk_ref) t_ref = $time;
  always @(posedge clk_div) begin
    int e;
    e = int'($time - t_ref);
    if (e > REF_HALF) e -= 2 * REF_HALF;
    if (e < 0) e = -e;
    if (e > max_err) max_err = e;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int n);
    int e0, got;
    n_div = ndiv_t'(n);
    @(negedge clk_ref);
    enable = 1'b1;
    repeat (2) @(posedge clk_ref);
    #1;
    check(!dco_enable, "DCO started before the TDC search ended");
    @(posedge clk_ref);
    #1;
    check(dco_enable && state == ST_TRACK, "DCO not started after two reference cycles");
    repeat (150) @(posedge clk_ref);
    max_err = 0;
    e0 = dco_edges;
    repeat (32) @(posedge clk_ref);
    got = dco_edges - e0;
    check(got >= 32 * n - 2 && got <= 32 * n + 2, $sformatf("N=%0d: %0d DCO edges, want %0d", n, got, 32 * n));
    check(max_err < 8000, $sformatf("N=%0d: phase error %0d ps", n, max_err));
    check(locked, $sformatf("N=%0d: not locked", n));
    $display("N=%0d: %0d edges in 32 periods, max |phase err| %0d ps, code %0d/%0d",
             n, got, max_err, tune.coarse, tune.fine);
    @(negedge clk_ref);
    enable = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk_ref);
    rst_n = 1'b1;
    run(16);
    repeat (3) @(posedge clk_ref);
    run(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * REF_HALF * 500);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
