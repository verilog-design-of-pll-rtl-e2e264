// tb_adpll_corners: the ADPLL with its oscillator and TDC cells at the three process corners
// of the cell characterisation (steps and operating ranges per corner):
//   best     coarse 130 ps, fine 21 ps, fastest 722 MHz  (half period 693 ps)
//   typical  coarse 181 ps, fine 28 ps, fastest 498 MHz  (half period 1004 ps)
//   worst    coarse 306 ps, fine 62 ps, fastest 286 MHz  (half period 1748 ps)
// The control logic keeps its typical calibration constants. With a 20 MHz reference:
//  * N = 16 (320 MHz) must lock at the best and typical corners;
//  * at the worst corner 320 MHz is above the fastest setting: the loop must end at coarse 0,
//    fine 0 (its fastest code), run slow and keep LOCKED low;
//  * N = 10 (200 MHz) must lock at the typical and worst corners; at the best corner it is
//    below the slowest setting and the loop must end at coarse 8, fine 7, LOCKED low.
// Lock means N edges per reference period over 32 periods (+-2 edges), CLK_DIV within three
// DCO periods of CLK_REF after settling (the filter's dead zone is about two), LOCKED high.
`timescale 1ps/1ps
module tb_adpll_corners;
  import adpll_pkg::*;
  localparam int REF_HALF = 25000;
  logic clk_ref = 1'b0, rst_n = 1'b1, enable = 1'b0;
  ndiv_t n_div = 8'd16;
  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;          // an edge, so the asynchronous reset acts

  always #(REF_HALF) clk_ref = ~clk_ref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [2:0] clk_dco, clk_div, dco_enable, locked;
  dco_tune_t tune [3];
  hper_t tdc_hper [3];
  ctrl_state_t state [3];

  adpll #(.CELL_HALF_MIN_PS(693), .CELL_COARSE_PS(130), .CELL_FINE_PS(21)) u_best (
    .clk_ref, .rst_n, .enable, .n_div, .clk_dco(clk_dco[0]), .clk_div(clk_div[0]), .tune(tune[0]),
    .tdc_hper(tdc_hper[0]), .dco_enable(dco_enable[0]), .locked(locked[0]), .state(state[0]));
  adpll u_typ (
    .clk_ref, .rst_n, .enable, .n_div, .clk_dco(clk_dco[1]), .clk_div(clk_div[1]), .tune(tune[1]),
    .tdc_hper(tdc_hper[1]), .dco_enable(dco_enable[1]), .locked(locked[1]), .state(state[1]));
  adpll #(.CELL_HALF_MIN_PS(1748), .CELL_COARSE_PS(306), .CELL_FINE_PS(62)) u_worst (
    .clk_ref, .rst_n, .enable, .n_div, .clk_dco(clk_dco[2]), .clk_div(clk_div[2]), .tune(tune[2]),
    .tdc_hper(tdc_hper[2]), .dco_enable(dco_enable[2]), .locked(locked[2]), .state(state[2]));

  int edges [3];
  int max_err [3];
  time t_ref;
  always @(posedge clk_ref) t_ref = $time;
  for (genvar g = 0; g < 3; g++) begin : g_mon
    always @(posedge clk_dco[g]) edges[g]++;
    always @(posedge clk_div[g]) begin
      int e;
      e = int'($time - t_ref);
      if (e > REF_HALF) e -= 2 * REF_HALF;
      if (e < 0) e = -e;
      if (e > max_err[g]) max_err[g] = e;
    end
  end

  string name [3] = '{"best", "typical", "worst"};

  task automatic run(input int n, input int expect_lock [3]);   // 1 lock, 0 too fast, 2 too slow
    int e0 [3];
    n_div = ndiv_t'(n);
    @(negedge clk_ref);
    enable = 1'b1;
    repeat (400) @(posedge clk_ref);
    for (int g = 0; g < 3; g++) begin
      max_err[g] = 0;
      e0[g] = edges[g];
    end
    repeat (32) @(posedge clk_ref);
    for (int g = 0; g < 3; g++) begin
      int got;
      got = edges[g] - e0[g];
      $display("%s corner, N=%0d: %0d edges in 32 periods (want %0d), max |phase err| %0d ps, code %0d/%0d, locked %0b",
               name[g], n, got, 32 * n, max_err[g], tune[g].coarse, tune[g].fine, locked[g]);
      if (expect_lock[g] == 1) begin
        check(got >= 32 * n - 2 && got <= 32 * n + 2, $sformatf("%s N=%0d: frequency", name[g], n));
        check(max_err[g] < 3 * (2 * REF_HALF / n), $sformatf("%s N=%0d: phase error %0d", name[g], n, max_err[g]));
        check(locked[g], $sformatf("%s N=%0d: not locked", name[g], n));
      end else if (expect_lock[g] == 0) begin
        check(tune[g].coarse == '0 && tune[g].fine == '0, $sformatf("%s N=%0d: not at the fastest code", name[g], n));
        check(got < 32 * n - 16, $sformatf("%s N=%0d: unexpectedly reached the target", name[g], n));
        check(!locked[g], $sformatf("%s N=%0d: LOCKED out of range", name[g], n));
      end else begin
        check(tune[g].coarse == coarse_t'(8) && tune[g].fine == '1, $sformatf("%s N=%0d: not at the slowest code", name[g], n));
        check(got > 32 * n + 16, $sformatf("%s N=%0d: unexpectedly reached the target", name[g], n));
        check(!locked[g], $sformatf("%s N=%0d: LOCKED out of range", name[g], n));
      end
    end
    @(negedge clk_ref);
    enable = 1'b0;
    repeat (3) @(posedge clk_ref);
  endtask

  initial begin
    repeat (2) @(negedge clk_ref);
    rst_n = 1'b1;
    run(16, '{1, 1, 0});
    run(10, '{2, 1, 1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * REF_HALF * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
