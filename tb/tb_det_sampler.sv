// Testbench for det_sampler: d carries a random bit per half period of
// clk_dly; after each rising edge s_hi and q must hold the value present at
// that edge, after each falling edge s_lo and q the value at that edge.
module tb_det_sampler;

  logic clk_dly = 1'b0;
  logic d = 1'b0;
  logic q, s_hi, s_lo;
  logic at_rise, at_fall;
  int   checks = 0;
  int   failures = 0;

  det_sampler dut (.clk_dly(clk_dly), .d(d), .q(q), .s_hi(s_hi), .s_lo(s_lo));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, e, $time);
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      // low half: set d, then rising edge
      d = 1'($urandom());
      #3 at_rise = d;
      clk_dly = 1'b1;
      #1 check(s_hi, at_rise, "s_hi after rise");
      check(q, at_rise, "q after rise");
      d = ~d;  // changes after the edge must not show up
      #1 check(q, at_rise, "q holds in high half");
      d = 1'($urandom());
      #3 at_fall = d;
      clk_dly = 1'b0;
      #1 check(s_lo, at_fall, "s_lo after fall");
      check(q, at_fall, "q after fall");
      check(s_hi, at_rise, "s_hi holds over fall");
      d = ~d;
      #1 check(q, at_fall, "q holds in low half");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
