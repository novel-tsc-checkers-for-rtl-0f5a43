// T flip-flop clock divider.
//
// Produces the clk input of the double output checkers: a signal at half the
// rate of the system clock, so that consecutive input words see opposite clk
// values. The T input is tied high, so q toggles on every rising system
// clock edge. The paper asks for a T flip-flop; the asynchronous active-low
// reset to 0 is this design's addition, to start from a known phase.
//
// Interface: clk system clock, rst_n reset, q divided clock.
// Timing: q changes right after each rising edge of clk.
module tff_divider (
  input  logic clk,
  input  logic rst_n,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= !q;
  end

endmodule
