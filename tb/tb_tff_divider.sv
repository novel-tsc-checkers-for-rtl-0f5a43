// Testbench for tff_divider: q is 0 in reset and toggles on every rising
// clock edge afterwards; a reset in mid-run returns it to 0 at once.
module tb_tff_divider;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic q;
  logic exp_q;
  int   checks = 0;
  int   failures = 0;

  tff_divider dut (.clk(clk), .rst_n(rst_n), .q(q));

  always #5 clk = ~clk;

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b at %0t", what, q, e, $time);
    end
  endtask

  initial begin
    #12;
    check(1'b0, "in reset");
    @(negedge clk);
    check(1'b0, "held in reset over a clock edge");
    rst_n = 1'b1;
    exp_q = 1'b0;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      exp_q = ~exp_q;
      check(exp_q, "toggle");
    end
    #2 rst_n = 1'b0;
    #1 check(1'b0, "asynchronous reset");
    @(negedge clk);
    check(1'b0, "reset held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
