// Test harness for one bose_checker_single of size (K, R), used by the
// checker's testbench to cover several sizes. It applies TRIALS random
// information words whose zero count is spread evenly over 0..K, each once
// with its correct check symbol zeros mod 2^R and once with a wrong one.
// Expected: code word -> out = clk in both halves of the period; check
// symbol too large -> out = 1 in both; too small -> out = 0 in both.
module bose_single_harness #(
  parameter int unsigned K      = 8,
  parameter int unsigned R      = 2,
  parameter int unsigned TRIALS = 500
) (
  output int   checks,
  output int   failures,
  output int   n_code,
  output int   n_high,
  output int   n_low,
  output logic done
);

  logic [K-1:0] i;
  logic [R-1:0] c;
  logic         clk;
  logic         out;

  bose_checker_single #(.K(K), .R(R)) dut (.i(i), .c(c), .clk(clk), .out(out));

  task automatic expect_out(input logic e, input string what);
    checks++;
    if (out !== e) begin
      failures++;
      if (failures < 10)
        $display("FAIL (K=%0d,R=%0d) %s: i=%h c=%0d clk=%0b out=%0b", K, R, what, i, c, clk, out);
    end
  endtask

  initial begin
    checks = 0; failures = 0; n_code = 0; n_high = 0; n_low = 0; done = 1'b0;
    i = '1; c = '0; clk = 1'b0;
    for (int t = 0; t < TRIALS; t++) begin
      int z, cs, bad;
      // information word with exactly z zeros
      z = $urandom_range(K, 0);
      i = '1;
      for (int cnt = 0; cnt < z; ) begin
        int p;
        p = $urandom_range(K - 1, 0);
        if (i[p]) begin i[p] = 1'b0; cnt++; end
      end
      cs = z % (2 ** R);
      c = R'(cs);
      clk = 1'b0; #1 expect_out(1'b0, "code word, clk=0");
      clk = 1'b1; #1 expect_out(1'b1, "code word, clk=1");
      n_code++;
      // any other check symbol
      do bad = $urandom_range(2 ** R - 1, 0); while (bad == cs);
      c = R'(bad);
      clk = 1'b0; #1 expect_out(bad > cs, "non-code word, clk=0");
      clk = 1'b1; #1 expect_out(bad > cs, "non-code word, clk=1");
      if (bad > cs) n_high++; else n_low++;
    end
    done = 1'b1;
  end

endmodule
