// tb_divider: runs the divider on a 3.124 ns clock for several ratios and checks that the
// first CLK_DIV rising edge comes on the N-th DCO edge after reset, that every period is N
// DCO periods and that the high time is N/2 DCO periods.
`timescale 1ps/1ps
module tb_divider;
  import adpll_pkg::*;
  localparam int T = 3124;
  logic clk_dco = 1'b0, rst_n = 1'b0, clk_div;
  ndiv_t n_div = 8'd16;
  int checks = 0, failures = 0;
  int edges;

  divider dut (.clk_dco, .rst_n, .n_div, .clk_div);

  always #(T / 2) clk_dco = ~clk_dco;
  always @(posedge clk_dco) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ns[6] = '{16, 14, 2, 7, 255, 1};
    foreach (ns[k]) begin
      int n, e0, e1;
      time t0, t1, t2;
      n = (ns[k] < 2) ? 2 : ns[k];
      rst_n = 1'b0;
      n_div = ndiv_t'(ns[k]);
      @(negedge clk_dco);
      rst_n = 1'b1;
      e0 = edges;
      @(posedge clk_div);
      check(edges - e0 == n, $sformatf("N=%0d: first edge after %0d DCO edges", ns[k], edges - e0));
      for (int p = 0; p < 3; p++) begin
        t0 = $time;
        @(negedge clk_div);
        t1 = $time;
        @(posedge clk_div);
        t2 = $time;
        check(t2 - t0 == n * T, $sformatf("N=%0d: period %0t", ns[k], t2 - t0));
        check(t1 - t0 == (n / 2) * T, $sformatf("N=%0d: high time %0t", ns[k], t1 - t0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
