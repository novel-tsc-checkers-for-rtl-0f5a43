// Testbench for mzero_threshold: all 256 words on two 8-input circuits
// (thresholds 4 and 8, the two circuits of the k=8, r=2 checker) and random
// words on a 32-input circuit with threshold 12. The expected output is
// worked out from a bit-by-bit zero count.
module tb_mzero_threshold;

  logic [7:0]  x8;
  logic [31:0] x32;
  logic        out4, out8, out12;
  int          checks = 0;
  int          failures = 0;

  mzero_threshold #(.N(8),  .M(4))  dut4  (.x(x8),  .out(out4));
  mzero_threshold #(.N(8),  .M(8))  dut8  (.x(x8),  .out(out8));
  mzero_threshold #(.N(32), .M(12)) dut12 (.x(x32), .out(out12));

  function automatic int zeros_of(input logic [31:0] v, input int n);
    int z = 0;
    for (int b = 0; b < n; b++) if (v[b] == 1'b0) z++;
    return z;
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v);
      #1;
      check(out4, zeros_of(32'(v), 8) >= 4 ? 1'b0 : 1'b1, $sformatf("M=4 x=%02h", v));
      check(out8, zeros_of(32'(v), 8) >= 8 ? 1'b0 : 1'b1, $sformatf("M=8 x=%02h", v));
    end
    for (int n = 0; n < 2000; n++) begin
      x32 = $urandom();
      // bias toward the threshold region by clearing random bits
      if (n % 2 == 1) x32 = x32 | $urandom() | $urandom();
      #1;
      check(out12, zeros_of(x32, 32) >= 12 ? 1'b0 : 1'b1, $sformatf("M=12 x=%08h", x32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
