// ts_accuracy_counter: compare-and-count unit for judging a timing-error predictor.
//
// Every valid cycle it compares the actual timing-error signal (from a reference such as
// a delay-annotated gate-level simulation or a prototype with real error detection) with
// the emulated one, and increments one of four counters:
//     a: actual error,    emulated error      (true positive)
//     b: actual error,    no emulated error   (false negative)
//     c: no actual error, emulated error      (false positive)
//     d: no actual error, no emulated error   (true negative)
// From them: error rate = (a+b)/N, accuracy = (a+d)/N, false-positive rate = c/N,
// false-negative rate = b/N with N = a+b+c+d. The four cases and the formulas are the
// published evaluation metrics; the counter width, the clear input and the wrap-around on
// overflow are this design's choices (32 bits hold the longest published run, 28M cycles).
//
// Interface: valid, actual_err, emu_err in; clear zeroes all counters; cnt_a..cnt_d out.
// Timing: counters update on the rising clk edge, one cycle after the sample; rst_n is
// synchronous, active low.
module ts_accuracy_counter #(
  parameter int CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             valid,
  input  logic             actual_err,
  input  logic             emu_err,
  output logic [CNT_W-1:0] cnt_a,
  output logic [CNT_W-1:0] cnt_b,
  output logic [CNT_W-1:0] cnt_c,
  output logic [CNT_W-1:0] cnt_d
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      cnt_a <= '0;
      cnt_b <= '0;
      cnt_c <= '0;
      cnt_d <= '0;
    end else if (valid) begin
      unique case ({actual_err, emu_err})
        2'b11: cnt_a <= cnt_a + 1'b1;
        2'b10: cnt_b <= cnt_b + 1'b1;
        2'b01: cnt_c <= cnt_c + 1'b1;
        2'b00: cnt_d <= cnt_d + 1'b1;
        default: ;
      endcase
    end
  end

endmodule
