// tb_tdc_delay_line: checks that tap i of the delay-line model follows its input
// i * STAGE_PS later, for both edges, on a short line (8 cells of 50 ps).
`timescale 1ps/1ps
module tb_tdc_delay_line;
  localparam int S = 8, D = 50;
  logic din = 1'b0;
  logic [S:0] tap;
  int checks = 0, failures = 0;

  tdc_delay_line #(.STAGES(S), .STAGE_PS(D)) dut (.din, .tap);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000;
    check(tap == '0, "taps not low at rest");
    din = 1'b1;
    for (int t = 0; t <= S; t++) begin
      // 25 ps after the edge reached tap t: taps 0..t high, the rest low
      #(t == 0 ? 25 : D);
      check(tap == (S+1)'((1 << (t + 1)) - 1), $sformatf("rise: taps %b at step %0d", tap, t));
    end
    #1000;
    din = 1'b0;
    for (int t = 0; t <= S; t++) begin
      #(t == 0 ? 25 : D);
      check(tap == ~(S+1)'((1 << (t + 1)) - 1), $sformatf("fall: taps %b at step %0d", tap, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
