// tb_tdc_decoder: feeds thermometer codes, some with a bubble and some with a second run of
// ones further up (an old edge in a long line), and checks that the counts are the ones
// below the first zero and that TDC_HPER = A*181 + B*28 picoseconds, computed here.
`timescale 1ps/1ps
module tb_tdc_decoder;
  import adpll_pkg::*;
  localparam int A_S = 200, B_S = 8;
  logic [A_S-1:0] flash_a;
  logic [B_S-1:0] flash_b;
  logic [7:0] count_a;
  logic [3:0] count_b;
  hper_t tdc_hper;
  int checks = 0, failures = 0;

  tdc_decoder dut (.flash_a, .flash_b, .count_a, .count_b, .tdc_hper);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      int a, b;
      a = (i < 2) ? i * A_S : $urandom_range(0, A_S);
      b = (i < 2) ? i * B_S : $urandom_range(0, B_S);
      flash_a = '0;
      for (int k = 0; k < a; k++) flash_a[k] = 1'b1;
      flash_b = '0;
      for (int k = 0; k < b; k++) flash_b[k] = 1'b1;
      if (i % 5 == 4 && a > 2 && a < A_S) begin   // bubble: count stops below it
        flash_a[a-2] = 1'b0;
        flash_a[a]   = 1'b1;
        a = a - 2;
      end else if (i % 5 == 3 && a + 10 < A_S) begin  // ones of an older edge further up
        for (int k = a + 5; k < A_S; k++) flash_a[k] = 1'b1;
      end
      #10;
      check(int'(count_a) == a && int'(count_b) == b, $sformatf("counts %0d/%0d, want %0d/%0d", count_a, count_b, a, b));
      check(int'(tdc_hper) == a * 181 + b * 28, $sformatf("hper %0d, want %0d", tdc_hper, a * 181 + b * 28));
    end
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
