// tb_digital_filter: clocks the filter at 320 MHz, produces one comparison per 50 ns
// reference cycle as an UP_PD pulse after the reference rising edge or a DN_PD pulse before
// it, and reads UP/DN at the reference falling edge, as the control block does. A pulse of
// at least GLITCH_CYC+1 DCO periods must give its decision, a pulse shorter than one DCO
// period (or a zero-width reset glitch) must give neither.
`timescale 1ps/1ps
module tb_digital_filter;
  localparam int DCO_HALF = 1562, REF_HALF = 25000;
  logic clk = 1'b0, rst_n = 1'b1, clk_ref = 1'b0, up_pd = 1'b0, dn_pd = 1'b0;
  logic up, dn;
  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;          // an edge, so the asynchronous reset acts
  int n_glitch = 0;

  digital_filter dut (.clk, .rst_n, .clk_ref, .up_pd, .dn_pd, .up, .dn);

  always #(DCO_HALF) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one reference cycle with a phase error of err ps (>0: reference leads, UP)
  task automatic ref_cycle(input int err, input bit glitch);
    int pre;
    pre = (err < 0) ? -err : 0;
    #(REF_HALF - pre);
    if (err < 0) dn_pd = 1'b1;
    #(pre);
    clk_ref = 1'b1;
    dn_pd = 1'b0;
    if (glitch) begin           // zero-width reset glitch on the lagging output
      up_pd = 1'b1;
      #0 up_pd = 1'b0;
    end
    if (err > 0) begin
      up_pd = 1'b1;
      #(err) up_pd = 1'b0;
      #(REF_HALF - err);
    end else begin
      #(REF_HALF);
    end
    clk_ref = 1'b0;
    check(up == (err >= 3 * 2 * DCO_HALF), $sformatf("err %0d: UP=%0b", err, up));
    check(dn == (-err >= 3 * 2 * DCO_HALF), $sformatf("err %0d: DN=%0b", err, dn));
  endtask

  initial begin
    #1000 rst_n = 1'b1;
    ref_cycle(0, 1'b0);
    for (int i = 0; i < 60; i++) begin
      int e;
      case (i % 4)
        0: e = $urandom_range(9500, 12000);
        1: e = -int'($urandom_range(9500, 12000));
        2: e = $urandom_range(0, 2900) * (i % 8 == 2 ? 1 : -1);
        default: e = 0;
      endcase
      ref_cycle(e, i % 4 == 3);
      if (i % 4 == 3) n_glitch++;
    end
    check(n_glitch > 0, "no glitch case");
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
