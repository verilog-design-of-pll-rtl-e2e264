// tb_phase_locked_loop: drives word pairs into the phase monitor and checks, one clock
// later, the signed error ref_word - feedback_word, its magnitude and the lock flag; then
// rst_adc and reset. A second instance with LOCK_CYCLES = 3 checks the counted lock rule.
`timescale 1ps/1ps
module tb_phase_locked_loop;
  logic clk = 1'b0, reset = 1'b0, rst_adc = 1'b0;
  logic [31:0] ref_word = '0, feedback_word = '0;
  logic signed [31:0] phase_error, phase_error3;
  logic [31:0] phase_error_abs, phase_error_abs3;
  logic locked, locked3;
  int checks = 0, failures = 0;

  initial #1 reset = 1'b1;          // an edge, so the asynchronous reset acts
  int zero_run = 0;

  phase_locked_loop dut (.clk, .reset, .rst_adc, .ref_word, .feedback_word,
                         .phase_error, .phase_error_abs, .locked);
  phase_locked_loop #(.LOCK_CYCLES(3)) dut3 (.clk, .reset, .rst_adc, .ref_word, .feedback_word,
                         .phase_error(phase_error3), .phase_error_abs(phase_error_abs3), .locked(locked3));

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #12000;
    check(phase_error == 0 && phase_error_abs == 0 && !locked, "reset values");
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 300; i++) begin
      logic [31:0] r, f;
      longint d;
      case (i % 5)
        0, 1: begin r = 32'd10; f = 32'd10; end
        2: begin r = $urandom; f = $urandom; end
        3: begin r = $urandom_range(0, 20); f = 32'd10; end
        default: begin r = 32'h8000_0000; f = $urandom_range(0, 3); end
      endcase
      ref_word = r;
      feedback_word = f;
      @(negedge clk);
      d = longint'(signed'(r - f));
      zero_run = (r == f) ? zero_run + 1 : 0;
      check(longint'(phase_error) == d, $sformatf("error %0d, want %0d", phase_error, d));
      check(phase_error_abs == 32'(d < 0 ? -d : d), $sformatf("abs %0d for %0d", phase_error_abs, d));
      check(locked == (zero_run >= 1), "locked (1 cycle)");
      check(locked3 == (zero_run >= 3), "locked (3 cycles)");
    end
    ref_word = 32'd7;
    feedback_word = 32'd7;
    repeat (4) @(negedge clk);
    check(locked && locked3, "not locked on equal words");
    rst_adc = 1'b1;
    ref_word = 32'd100;
    @(negedge clk);
    check(phase_error == 0 && phase_error_abs == 0 && !locked && !locked3, "rst_adc did not clear");
    rst_adc = 1'b0;
    @(negedge clk);
    check(phase_error == 93 && phase_error_abs == 93, "no update after rst_adc");
    #1 reset = 1'b1;
    #1;
    check(phase_error == 0 && !locked, "asynchronous reset did not clear");
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
