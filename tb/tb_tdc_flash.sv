// tb_tdc_flash: drives tap patterns into the flash register and checks that it loads them at
// the falling reference edge only when enabled, holds them otherwise, and resets to zero.
`timescale 1ps/1ps
module tb_tdc_flash;
  localparam int S = 12;
  logic clk_ref = 1'b1, rst_n = 1'b1, en = 1'b0;
  logic [S:1] tap = '0;
  logic [S-1:0] therm, expect_q;
  int checks = 0, failures = 0;

  initial #1 rst_n = 1'b0;          // an edge, so the asynchronous reset acts

  tdc_flash #(.STAGES(S)) dut (.clk_ref, .rst_n, .en, .tap, .therm);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    expect_q = '0;
    #100 rst_n = 1'b1;
    for (int i = 0; i < 30; i++) begin
      logic [S-1:0] pat;
      pat = S'($urandom);
      en  = (i % 3 != 1);
      tap = pat;
      #500 clk_ref = 1'b0;           // stop edge
      #10;
      if (en) expect_q = pat;
      check(therm == expect_q, $sformatf("cycle %0d: %b, want %b", i, therm, expect_q));
      tap = ~pat;                    // must not be loaded at the rising edge
      #490 clk_ref = 1'b1;
      #10;
      check(therm == expect_q, "changed at the rising edge");
    end
    rst_n = 1'b0;
    #10;
    check(therm == '0, "reset did not clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
