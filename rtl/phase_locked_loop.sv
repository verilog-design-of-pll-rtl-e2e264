// phase_locked_loop: word-level phase error monitor with lock flag.
//
// Compares a reference phase word with a feedback phase word (the feedback would come from
// the oscillator; in test both are driven directly). On every rising clock edge it registers
// the signed difference phase_error = ref_word - feedback_word and its magnitude
// phase_error_abs. A 32-bit counter counts consecutive cycles with zero error and is cleared
// by any nonzero error; `locked` is high once it reaches LOCK_CYCLES (1 by default, so
// `locked` follows the error one cycle later). `reset` is an asynchronous active-high reset of
// everything; `rst_adc` synchronously clears the error registers and the counter. The port
// names and widths, the error, its magnitude, the lock flag and the 32-bit counter are the
// design's; the subtraction order, the meaning of rst_adc and the lock rule are choices
// made here. Latency: one clock from a word change to the outputs.
`timescale 1ps/1ps
module phase_locked_loop #(
  parameter int unsigned W           = 32,
  parameter int unsigned LOCK_CYCLES = 1
) (
  input  logic                clk,
  input  logic                reset,
  input  logic                rst_adc,
  input  logic [W-1:0]        ref_word,
  input  logic [W-1:0]        feedback_word,
  output logic signed [W-1:0] phase_error,
  output logic [W-1:0]        phase_error_abs,
  output logic                locked
);

  logic signed [W-1:0] diff;
  logic [31:0]         zero_cnt;

  assign diff = signed'(ref_word - feedback_word);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      phase_error     <= '0;
      phase_error_abs <= '0;
      zero_cnt        <= '0;
    end else if (rst_adc) begin
      phase_error     <= '0;
      phase_error_abs <= '0;
      zero_cnt        <= '0;
    end else begin
      phase_error     <= diff;
      phase_error_abs <= diff[W-1] ? W'(-diff) : W'(diff);
      if (diff != '0)                   zero_cnt <= '0;
      else if (zero_cnt != 32'hFFFF_FFFF) zero_cnt <= zero_cnt + 1'b1;
    end
  end

  assign locked = (zero_cnt >= LOCK_CYCLES);

endmodule
