// tb_phase_detector: drives reference and divided clocks with known offsets and measures the
// UP_PD/DN_PD pulse widths, which must equal the offset for the leading input while the
// other output carries no pulse of measurable width. Also checks the enable gate.
`timescale 1ps/1ps
module tb_phase_detector;
  logic clk_ref = 1'b0, clk_div = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic up_pd, dn_pd;
  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;          // an edge, so the asynchronous reset acts
  time up_rise, dn_rise;
  int up_w, dn_w;

  phase_detector dut (.clk_ref, .clk_div, .rst_n, .en, .up_pd, .dn_pd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge up_pd) up_rise = $time;
  always @(negedge up_pd) up_w += int'($time - up_rise);
  always @(posedge dn_pd) dn_rise = $time;
  always @(negedge dn_pd) dn_w += int'($time - dn_rise);

  // one comparison: offset > 0 means the reference leads
  task automatic compare(input int offset);
    up_w = 0;
    dn_w = 0;
    if (offset >= 0) begin
      clk_ref = 1'b1; #(offset); clk_div = 1'b1;
    end else begin
      clk_div = 1'b1; #(-offset); clk_ref = 1'b1;
    end
    #5000;
    clk_ref = 1'b0;
    clk_div = 1'b0;
    #5000;
    check(!up_pd && !dn_pd, "outputs not both low after the comparison");
    check(up_w == (offset > 0 ? offset : 0), $sformatf("offset %0d: UP width %0d", offset, up_w));
    check(dn_w == (offset < 0 ? -offset : 0), $sformatf("offset %0d: DN width %0d", offset, dn_w));
  endtask

  initial begin
    #100 rst_n = 1'b1;
    // disabled: the reference edge must not set UP_PD
    clk_ref = 1'b1; #1000;
    check(!up_pd, "UP_PD set while disabled");
    clk_ref = 1'b0; #1000;
    en = 1'b1;
    #1000;
    for (int i = 0; i < 40; i++) compare(int'($urandom_range(0, 8000)) - 4000);
    compare(0);
    compare(1);
    compare(-1);
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
