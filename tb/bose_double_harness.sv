// Test harness for one bose_checker_double of size (K, R). Random words
// with their zero count spread over 0..K, each with its correct and with a
// wrong check symbol, under both clk levels. Expected: code word ->
// (out1, out2) = (!clk, clk); check symbol too large -> (1,1); too small ->
// (0,0).
module bose_double_harness #(
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
  logic         out1, out2;

  bose_checker_double #(.K(K), .R(R)) dut (.i(i), .c(c), .clk(clk), .out1(out1), .out2(out2));

  task automatic expect_pair(input logic e1, input logic e2, input string what);
    checks++;
    if (out1 !== e1 || out2 !== e2) begin
      failures++;
      if (failures < 10)
        $display("FAIL (K=%0d,R=%0d) %s: i=%h c=%0d clk=%0b out=%0b%0b", K, R, what, i, c, clk, out1, out2);
    end
  endtask

  initial begin
    checks = 0; failures = 0; n_code = 0; n_high = 0; n_low = 0; done = 1'b0;
    i = '1; c = '0; clk = 1'b0;
    for (int t = 0; t < TRIALS; t++) begin
      int z, cs, bad;
      z = $urandom_range(K, 0);
      i = '1;
      for (int cnt = 0; cnt < z; ) begin
        int p;
        p = $urandom_range(K - 1, 0);
        if (i[p]) begin i[p] = 1'b0; cnt++; end
      end
      cs = z % (2 ** R);
      c = R'(cs);
      clk = 1'b0; #1 expect_pair(1'b1, 1'b0, "code word, clk=0");
      clk = 1'b1; #1 expect_pair(1'b0, 1'b1, "code word, clk=1");
      n_code++;
      do bad = $urandom_range(2 ** R - 1, 0); while (bad == cs);
      c = R'(bad);
      clk = 1'b0; #1 expect_pair(bad > cs, bad > cs, "non-code word, clk=0");
      clk = 1'b1; #1 expect_pair(bad > cs, bad > cs, "non-code word, clk=1");
      if (bad > cs) n_high++; else n_low++;
    end
    done = 1'b1;
  end

endmodule
