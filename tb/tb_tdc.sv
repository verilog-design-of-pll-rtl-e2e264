// tb_tdc: runs the two-level TDC on reference clocks of several high-phase lengths. In the
// first cycle (TDC_A) the coarse thermometer must hold floor(H / 181 ps) ones; in the second
// (TDC_B) the fine thermometer must hold floor((H - A*181) / 28) ones. Expected values are
// computed here from the cell delays; the high phases avoid exact multiples of a cell. The
// low phase is shorter than the coarse line, so older edges are still in the line when it
// is sampled and must not disturb the count.
`timescale 1ps/1ps
module tb_tdc;
  localparam int A_S = 200, B_S = 8, AC = 181, BC = 28;
  logic clk_ref = 1'b0, rst_n = 1'b1, tdc_a_en = 1'b0, tdc_b_en = 1'b0;
  logic [A_S-1:0] flash_a;
  logic [B_S-1:0] flash_b;
  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;          // an edge, so the asynchronous reset acts
  int hi_ps;

  tdc dut (.clk_ref, .rst_n, .tdc_a_en, .tdc_b_en, .flash_a, .flash_b);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // length of the leading run of ones
  function automatic int ones(input logic [A_S-1:0] v);
    int n = 0;
    while (n < A_S && v[n]) n++;
    return n;
  endfunction

  // one reference period: high for hi_ps, then low for 20 ns, shorter than the 36 ns coarse
  // line, so that the previous cycle's edge can still be travelling further down the line
  task automatic ref_cycle();
    clk_ref = 1'b1;
    #(hi_ps);
    clk_ref = 1'b0;
    #20000;
  endtask

  initial begin
    int hs[6] = '{25000, 20010, 12345, 28000, 3000, 90};
    #1000 rst_n = 1'b1;
    #1000;
    foreach (hs[k]) begin
      int a, b;
      hi_ps = hs[k];
      a = (hi_ps - 1) / AC;
      b = (hi_ps - 1 - a * AC) / BC;
      ref_cycle();                       // idle cycle, nothing enabled
      tdc_a_en = 1'b1;
      ref_cycle();
      tdc_a_en = 1'b0;
      check(ones(flash_a) == a, $sformatf("H=%0d: coarse %0d, want %0d", hi_ps, ones(flash_a), a));
      check((A_S'(flash_a) & A_S'((A_S'(1) << (a + 10)) - 1)) == A_S'((A_S'(1) << a) - 1),
            "coarse code not a clean thermometer near its end");
      tdc_b_en = 1'b1;
      ref_cycle();
      tdc_b_en = 1'b0;
      check(ones(A_S'(flash_b)) == b, $sformatf("H=%0d: fine %0d, want %0d", hi_ps, ones(A_S'(flash_b)), b));
      hi_ps = 7000;                      // codes must hold while not enabled
      ref_cycle();
      check(ones(flash_a) == a && ones(A_S'(flash_b)) == b, "codes not held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
