// tb_adpll_top: end-to-end test of the ADPLL and of the word-level phase monitor.
//
// ADPLL part, at the default parameters with a 20 MHz reference and N = 16 (320 MHz):
//  * TDC search: TDC_A and TDC_B last one reference cycle each and the DCO starts on the
//    third reference edge after ENABLE; TDC_HPER and the starting code are compared with
//    values worked out here from the 181/28 ps cell delays.
//  * Lock: after settling, the DCO rising edges counted over 32 reference periods must be
//    N*32 within a small margin, the divided clock must stay within a phase window of the
//    reference, and LOCKED must be high.
//  * Ratio change to N = 14 (370 MHz): needs a coarse carry; the loop must relock.
//  * N = 6 (120 MHz, below the slowest DCO code): the code must pin at its slow end with
//    LOCKED low; then back to N = 16 and relock.
//  * ENABLE low then high: the loop must stop, search again and relock at N = 16.
// Each mechanism (UP decision, DN decision, dead-zone cycle, coarse carry up and down,
// TDC search, lock, stop, out-of-range push) is counted, and one that never happened counts as a failure.
// Monitor part: a few word pairs, checked against the difference worked out here.
`timescale 1ps/1ps
module tb_adpll_top;
  import adpll_pkg::*;

  localparam int REF_HALF_PS = 25000;   // 20 MHz

  logic clk_ref = 1'b0, rst_n = 1'b1, enable = 1'b0;
  ndiv_t n_div = 8'd16;
  logic clk_dco, clk_div, dco_enable, pll_locked;
  dco_tune_t tune;
  hper_t tdc_hper;
  ctrl_state_t state;

  logic clk = 1'b0, reset = 1'b0, rst_adc = 1'b0;
  logic [31:0] ref_word = '0, feedback_word = '0;
  logic signed [31:0] phase_error;
  logic [31:0] phase_error_abs;
  logic locked;

  int checks = 0, failures = 0;

  initial #1 reset = 1'b1;          // an edge, so the asynchronous reset acts

  initial #1 rst_n = 1'b0;          // an edge, so the asynchronous reset acts
  int n_up = 0, n_dn = 0, n_dead = 0, n_carry_up = 0, n_carry_dn = 0;
  int n_search = 0, n_lock = 0, n_stop = 0, n_pinned = 0;

  adpll_top dut (.*);

  always #(REF_HALF_PS) clk_ref = ~clk_ref;
  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters, sampled once per reference cycle ----------------------------
  coarse_t coarse_q;
  always @(posedge clk_ref) begin
    if (state == ST_TRACK) begin
      if (dut.u_adpll.u_control.up_s)      n_up++;
      else if (dut.u_adpll.u_control.dn_s) n_dn++;
      else                                 n_dead++;
      if (tune.coarse > coarse_q) n_carry_up++;
      if (tune.coarse < coarse_q) n_carry_dn++;
    end
    if (state == ST_TDC_A) n_search++;
    if (state == ST_TRACK && dut.u_adpll.u_control.pinned) n_pinned++;
    coarse_q = tune.coarse;
  end

  // ---- phase of CLK_DIV against CLK_REF ------------------------------------------------
  time t_ref;
  int  max_err_ps;
  always @(posedge clk_ref) t_ref = $time;
  always @(posedge clk_div) begin
    int e;
    e = int'($time - t_ref);
    if (e > REF_HALF_PS) e = e - 2 * REF_HALF_PS;   // CLK_DIV just ahead of the next edge
    if (e < 0) e = -e;
    if (e > max_err_ps) max_err_ps = e;
  end

  int dco_edges;
  always @(posedge clk_dco) dco_edges++;

  // count DCO edges over 32 reference periods after settling; check phase window as well
  task automatic check_lock(input int n, input string tag);
    int e0, got, lo, hi;
    repeat (150) @(posedge clk_ref);
    max_err_ps = 0;
    @(posedge clk_ref);
    e0 = dco_edges;
    repeat (32) @(posedge clk_ref);
    got = dco_edges - e0;
    lo = 32 * n - 2;
    hi = 32 * n + 2;
    check(got >= lo && got <= hi, $sformatf("%s: %0d DCO edges in 32 ref periods, want %0d", tag, got, 32 * n));
    check(max_err_ps < 8000, $sformatf("%s: phase error up to %0d ps", tag, max_err_ps));
    check(pll_locked, $sformatf("%s: LOCKED low", tag));
    if (pll_locked) n_lock++;
    $display("%s: edges %0d (want %0d), max |phase err| %0d ps, coarse %0d fine %0d",
             tag, got, 32 * n, max_err_ps, tune.coarse, tune.fine);
  endtask

  task automatic check_search(input int n);
    int hp_exp, a, b, tgt, ex, c, f;
    // search timing: ENABLE sampled at edge 0, TDC_A for one cycle, TDC_B for one, DCO at edge 3
    @(posedge clk_ref); #1;
    check(state == ST_TDC_A, "TDC_A not entered on the edge after ENABLE");
    @(posedge clk_ref); #1;
    check(state == ST_TDC_B && !dco_enable, "TDC_B not entered after one reference cycle");
    @(posedge clk_ref); #1;
    check(state == ST_TRACK && dco_enable, "DCO not started two reference cycles after TDC_A");
    // expected TDC result from the cell delays
    a = (REF_HALF_PS - 1) / COARSE_STEP_PS;
    b = (REF_HALF_PS - 1 - a * COARSE_STEP_PS) / FINE_STEP_PS;
    hp_exp = a * COARSE_STEP_PS + b * FINE_STEP_PS;
    check(int'(tdc_hper) == hp_exp, $sformatf("TDC_HPER %0d, want %0d", tdc_hper, hp_exp));
    tgt = hp_exp / n;
    ex  = tgt - DCO_HALF_MIN_PS;
    c   = ex / COARSE_STEP_PS;
    f   = (ex - c * COARSE_STEP_PS) / FINE_STEP_PS;
    check(int'(tune.coarse) == c && int'(tune.fine) == f,
          $sformatf("start code %0d/%0d, want %0d/%0d", tune.coarse, tune.fine, c, f));
  endtask

  // ---- ADPLL sequence ------------------------------------------------------------------
  initial begin : adpll_seq
    repeat (3) @(negedge clk_ref);
    rst_n = 1'b1;
    @(negedge clk_ref);
    enable = 1'b1;
    check_search(16);
    check_lock(16, "N=16");

    n_div = 8'd14;
    check_lock(14, "N=14");

    // N = 6 asks for 120 MHz, below the slowest code: the code must pin at 8/7, LOCKED low
    n_div = 8'd6;
    repeat (200) @(posedge clk_ref);
    #1;
    check(tune.coarse == coarse_t'(8) && tune.fine == '1 && !pll_locked,
          $sformatf("N=6: code %0d/%0d locked %0b, want 8/7 and not locked", tune.coarse, tune.fine, pll_locked));

    n_div = 8'd16;
    check_lock(16, "back to N=16");

    @(negedge clk_ref);
    enable = 1'b0;
    repeat (3) @(posedge clk_ref);
    #1;
    check(!dco_enable && state == ST_IDLE, "ENABLE low did not stop the DCO");
    if (!dco_enable) n_stop++;
    @(negedge clk_ref);
    enable = 1'b1;
    check_search(16);
    check_lock(16, "restart N=16");

    check(n_up > 0, "no UP decision seen");
    check(n_dn > 0, "no DN decision seen");
    check(n_dead > 0, "no dead-zone (filtered) cycle seen");
    check(n_carry_up > 0, "no coarse carry up");
    check(n_carry_dn > 0, "no coarse carry down");
    check(n_search == 2, $sformatf("%0d TDC searches, want 2", n_search));
    check(n_lock >= 4, "lock not reached every time");
    check(n_stop == 1, "stop not seen");
    check(n_pinned > 0, "out-of-range push never seen");
    $display("mechanisms: up %0d dn %0d dead %0d carry_up %0d carry_dn %0d search %0d lock %0d stop %0d pinned %0d",
             n_up, n_dn, n_dead, n_carry_up, n_carry_dn, n_search, n_lock, n_stop, n_pinned);
    wait (monitor_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- monitor sequence ----------------------------------------------------------------
  bit monitor_done = 1'b0;
  initial begin : monitor_seq
    int signed d;
    logic [31:0] r, f;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 40; i++) begin
      r = (i % 4 == 0) ? 32'd10 : $urandom_range(0, 40);
      f = (i % 4 == 0) ? 32'd10 : $urandom_range(0, 40);
      ref_word = r;
      feedback_word = f;
      @(negedge clk);
      d = signed'(r - f);
      check(phase_error == d, $sformatf("phase_error %0d, want %0d", phase_error, d));
      check(phase_error_abs == 32'(d < 0 ? -d : d), "phase_error_abs wrong");
      check(locked == (d == 0), "monitor locked wrong");
    end
    rst_adc = 1'b1;
    ref_word = 32'd5;
    @(negedge clk);
    check(phase_error == 0 && !locked, "rst_adc did not clear the monitor");
    rst_adc = 1'b0;
    monitor_done = 1'b1;
  end

  initial begin : watchdog
    #(2 * REF_HALF_PS * 1500);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
