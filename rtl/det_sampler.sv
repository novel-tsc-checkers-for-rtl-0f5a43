// Double-edge-triggered sampling flip-flop for the single output checker.
//
// The single output checker encodes its verdict in time: for a code word its
// output is 0 in the low half and 1 in the high half of the system clock
// period. This flip-flop samples it on both edges of clk_dly, a copy of the
// system clock delayed by more than the checker delay plus the setup time:
// the rising edge captures the value of the high half (s_hi), the falling
// edge the value of the low half (s_lo). q is the usual double-edge output,
// selecting the flop that was written last. A healthy checker and a code
// word give (s_lo, s_hi) = (0, 1) and q toggling; equal values flag an error.
// Sampling on both edges of a delayed clock follows the paper; the two-flop
// and multiplexer form and the s_hi/s_lo outputs are this design's choice.
//
// The system clock period must exceed 2 * (checker delay + setup time).
// There is no reset: both flops hold valid data after their first edge.
module det_sampler (
  input  logic clk_dly,
  input  logic d,
  output logic q,
  output logic s_hi,
  output logic s_lo
);

  always_ff @(posedge clk_dly) s_hi <= d;
  always_ff @(negedge clk_dly) s_lo <= d;

  assign q = clk_dly ? s_hi : s_lo;

endmodule
