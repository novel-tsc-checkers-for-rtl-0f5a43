// Test harness for one boselin_checker of size (K, R), R >= 4. For random
// information words it builds the Bose-Lin check symbol
// C = (zeros mod 2^(R-1)) + 2^(R-2) and checks:
//   * the code word gives a complementary z under both clk levels, with
//     z[1] = !(out1 ^ C_{R-1}) where out1 = !clk;
//   * a random wrong check symbol gives z = 00 or 11 under both clk levels;
//   * a unidirectional error of 1..2^(R-2)+R-2 bits anywhere in the word
//     (all flipped bits change the same way) is a non-code word, and the
//     checker flags it.
module boselin_harness #(
  parameter int unsigned K      = 64,
  parameter int unsigned R      = 4,
  parameter int unsigned TRIALS = 300
) (
  output int   checks,
  output int   failures,
  output int   n_code,
  output int   n_dbad,
  output int   n_pairbad,
  output int   n_unidir,
  output logic done
);

  localparam int unsigned T = 2 ** (R - 2) + R - 2;  // errors the code detects

  logic [K-1:0] i;
  logic [R-1:0] c;
  logic         clk;
  logic [1:0]   z;

  boselin_checker #(.K(K), .R(R)) dut (.i(i), .c(c), .clk(clk), .z(z));

  function automatic int zeros_of(input logic [K-1:0] v);
    int n = 0;
    for (int b = 0; b < K; b++) if (!v[b]) n++;
    return n;
  endfunction

  function automatic logic [R-1:0] check_symbol(input logic [K-1:0] v);
    return R'((zeros_of(v) % (2 ** (R - 1))) + 2 ** (R - 2));
  endfunction

  task automatic expect_valid(input string what);
    for (int k = 0; k < 2; k++) begin
      logic a1;
      clk = k[0];
      #1;
      a1 = !clk;
      checks++;
      if (z !== {!(a1 ^ c[R-1]), a1 ^ c[R-1]}) begin
        failures++;
        if (failures < 10)
          $display("FAIL (K=%0d,R=%0d) %s: i=%h c=%b clk=%0b z=%b", K, R, what, i, c, clk, z);
      end
    end
  endtask

  task automatic expect_invalid(input string what);
    for (int k = 0; k < 2; k++) begin
      clk = k[0];
      #1;
      checks++;
      if (z[1] !== z[0]) begin
        failures++;
        if (failures < 10)
          $display("FAIL (K=%0d,R=%0d) %s: i=%h c=%b clk=%0b z=%b", K, R, what, i, c, clk, z);
      end
    end
  endtask

  initial begin
    checks = 0; failures = 0; n_code = 0; n_dbad = 0; n_pairbad = 0; n_unidir = 0;
    done = 1'b0;
    i = '1; c = '0; clk = 1'b0;
    for (int t = 0; t < TRIALS; t++) begin
      int zc;
      logic [R-1:0] good, bad;
      logic [K+R-1:0] word, errw;
      int e;
      logic v;
      zc = $urandom_range(K, 0);
      i = '1;
      for (int cnt = 0; cnt < zc; ) begin
        int p;
        p = $urandom_range(K - 1, 0);
        if (i[p]) begin i[p] = 1'b0; cnt++; end
      end
      good = check_symbol(i);
      c = good;
      expect_valid("code word");
      n_code++;

      do bad = R'($urandom()); while (bad == good);
      c = bad;
      expect_invalid("wrong check symbol");
      if (bad[R-1] == bad[R-2]) n_pairbad++; else n_dbad++;

      // unidirectional error of e bits, all v -> !v
      word = {good, i};
      v = 1'($urandom());
      e = $urandom_range(T, 1);
      errw = word;
      for (int cnt = 0, tries = 0; cnt < e && tries < 10000; tries++) begin
        int p;
        p = $urandom_range(K + R - 1, 0);
        if (errw[p] == v && word[p] == v) begin errw[p] = !v; cnt++; end
      end
      if (errw != word) begin
        {c, i} = errw;
        checks++;
        if (c == check_symbol(i)) begin
          failures++;
          $display("FAIL (K=%0d,R=%0d) unidirectional error gave a code word", K, R);
        end
        expect_invalid("unidirectional error");
        n_unidir++;
      end
    end
    done = 1'b1;
  end

endmodule
