// tb_dco: measures the DCO model's period for every coarse and fine code against
// 2 * (1004 + coarse*181 + fine*28) ps (coarse clamped to 8), checks the Table-style
// operating range ends (498 MHz fastest, below 200 MHz slowest) and that disabling stops
// the output low.
`timescale 1ps/1ps
module tb_dco;
  import adpll_pkg::*;
  logic dco_enable = 1'b0, clk_dco;
  coarse_t coarse_tune = '0;
  fine_t fine_tune = '0;
  int checks = 0, failures = 0;

  dco dut (.dco_enable, .coarse_tune, .fine_tune, .clk_dco);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    time t0, t1;
    #5000;
    check(clk_dco == 1'b0, "output not low while disabled");
    dco_enable = 1'b1;
    for (int c = 0; c < 16; c++) begin
      for (int f = 0; f < 8; f++) begin
        int cc, want;
        coarse_tune = coarse_t'(c);
        fine_tune = fine_t'(f);
        cc = (c > 8) ? 8 : c;
        want = 2 * (1004 + cc * 181 + f * 28);
        repeat (2) @(posedge clk_dco);      // let the new code take effect
        t0 = $time;
        @(posedge clk_dco);
        t1 = $time;
        check(int'(t1 - t0) == want, $sformatf("code %0d/%0d: period %0t, want %0d", c, f, t1 - t0, want));
        if (c == 0 && f == 0) check(1000000 / int'(t1 - t0) == 498, "fastest setting not 498 MHz");
        if (c == 8 && f == 7) check(1000000 / int'(t1 - t0) < 200, "slowest setting not below 200 MHz");
      end
    end
    dco_enable = 1'b0;
    #10000;
    check(clk_dco == 1'b0, "output not stopped low");
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
