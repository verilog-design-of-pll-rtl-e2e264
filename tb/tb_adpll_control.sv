// tb_adpll_control: drives the control block with a 20 MHz reference, a TDC result and
// random UP/DN decisions (set just after each rising reference edge, as the filter does),
// and checks against a model kept here:
//  * sequence IDLE -> TDC_A -> TDC_B -> TRACK, one reference cycle each, DCO_ENABLE on the
//    third edge after ENABLE;
//  * the starting code from TDC_HPER / N for several TDC results and ratios;
//  * every tracking step: integral in quarter fine steps, one-step proportional kick, coarse
//    carry at both ends with the 26-quarter-step move back, clamping at coarse 0 and 8;
//  * LOCKED after 32 cycles without coarse change or out-of-range push, ENABLE low to IDLE.
`timescale 1ps/1ps
module tb_adpll_control;
  import adpll_pkg::*;
  localparam int REF_HALF = 25000;
  logic clk_ref = 1'b0, rst_n = 1'b1, enable = 1'b0, up = 1'b0, dn = 1'b0;
  ndiv_t n_div = 8'd16;
  hper_t tdc_hper = 16'd24978;
  logic tdc_a_en, tdc_b_en, dco_enable, locked;
  dco_tune_t tune;
  ctrl_state_t state;
  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;          // an edge, so the asynchronous reset acts
  int n_carry_up = 0, n_carry_dn = 0, n_lock = 0;

  adpll_control dut (.*);

  always #(REF_HALF) clk_ref = ~clk_ref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model state
  int m_c, m_i, m_f, m_quiet;

  task automatic start(input int hper, input int n);
    int tgt, ex;
    tdc_hper = hper_t'(hper);
    n_div = ndiv_t'(n);
    @(negedge clk_ref);
    enable = 1'b1;
    @(posedge clk_ref); #1;
    check(state == ST_TDC_A && tdc_a_en && !tdc_b_en && !dco_enable, "not in TDC_A");
    @(posedge clk_ref); #1;
    check(state == ST_TDC_B && tdc_b_en && !tdc_a_en && !dco_enable, "not in TDC_B");
    @(posedge clk_ref); #1;
    check(state == ST_TRACK && dco_enable && !tdc_b_en, "not in TRACK after two cycles");
    tgt = hper / ((n == 0) ? 1 : n);
    ex = (tgt > 1004) ? tgt - 1004 : 0;
    m_c = ex / 181;
    if (m_c > 8) begin
      m_c = 8;
      m_f = 7;
    end else begin
      m_f = (ex - m_c * 181) / 28;
    end
    m_i = 4 * m_f;
    m_quiet = 0;
    check(int'(tune.coarse) == m_c && int'(tune.fine) == m_f,
          $sformatf("hper %0d N %0d: start %0d/%0d, want %0d/%0d", hper, n, tune.coarse, tune.fine, m_c, m_f));
  endtask

  // one tracking cycle with decision d (+1 UP, -1 DN, 0 none)
  task automatic track(input int d);
    int old_c, base;
    bit pin;
    up = (d > 0);
    dn = (d < 0);
    @(negedge clk_ref);
    #1000;
    up = 1'b0;
    dn = 1'b0;
    @(posedge clk_ref); #1;
    old_c = m_c;
    pin = 1'b0;
    if (d > 0) begin
      if (m_i == 0) begin
        if (m_c > 0) begin m_c--; m_i = 25; end
        else pin = 1'b1;
      end else m_i--;
    end else if (d < 0) begin
      if (m_i == 31) begin
        if (m_c < 8) begin m_c++; m_i = 6; end
        else pin = 1'b1;
      end else m_i++;
    end
    if (m_c > old_c) n_carry_up++;
    if (m_c < old_c) n_carry_dn++;
    base = m_i / 4;
    m_f = (d > 0) ? ((base > 0) ? base - 1 : 0) : (d < 0) ? ((base < 7) ? base + 1 : 7) : base;
    m_quiet = (m_c != old_c || pin) ? 0 : (m_quiet < 32 ? m_quiet + 1 : 32);
    check(int'(tune.coarse) == m_c && int'(tune.fine) == m_f,
          $sformatf("step %0d: tune %0d/%0d, want %0d/%0d", d, tune.coarse, tune.fine, m_c, m_f));
    check(locked == (m_quiet == 32), $sformatf("locked %0b after %0d quiet cycles", locked, m_quiet));
    if (locked) n_lock++;
  endtask

  initial begin
    #1000 rst_n = 1'b1;
    start(24978, 16);
    for (int i = 0; i < 400; i++) begin
      int d;
      if (i < 60)       d = 1;                      // run down to coarse 0
      else if (i < 200) d = -1;                     // and up past coarse 8
      else if (i < 260) d = ($urandom_range(0, 2) == 0) ? 0 : ((i % 2) ? 1 : -1);
      else              d = int'($urandom_range(0, 2)) - 1;
      track(d);
    end
    @(negedge clk_ref);
    enable = 1'b0;
    @(posedge clk_ref); #1;
    check(state == ST_IDLE && !dco_enable, "ENABLE low did not return to IDLE");
    // other starting points
    start(25000, 14);
    track(0);
    @(negedge clk_ref); enable = 1'b0; @(posedge clk_ref);
    start(28000, 5);                                 // beyond the slowest code: clamp
    @(negedge clk_ref); enable = 1'b0; @(posedge clk_ref);
    start(9000, 20);                                 // faster than the fastest code
    @(negedge clk_ref); enable = 1'b0; @(posedge clk_ref);
    start(24978, 0);                                 // N = 0 treated as 1: clamp
    check(n_carry_up > 0 && n_carry_dn > 0, "coarse carry not exercised both ways");
    check(n_lock > 0, "LOCKED never high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * REF_HALF * 600);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
