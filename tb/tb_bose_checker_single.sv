// Testbench for bose_checker_single.
// Part 1: the 8-bit checker with r = 2 against every information word, every
// check symbol and both clock levels (exhaustive).
// Part 2: random code and non-code words on the sizes the paper evaluates:
// (k, r) = (8,2), (16,2), (16,3), (32,2), (32,3), (64,4).
// The reference is a zero count made here: code word when C = zeros mod 2^r.
module tb_bose_checker_single;

  int checks = 0;
  int failures = 0;

  logic [7:0] i;
  logic [1:0] c;
  logic       clk;
  logic       out;

  bose_checker_single #(.K(8), .R(2)) dut (.i(i), .c(c), .clk(clk), .out(out));

  localparam int NH = 6;
  int   h_checks[NH], h_failures[NH], h_code[NH], h_high[NH], h_low[NH];
  logic h_done[NH];

  bose_single_harness #(.K(8),  .R(2)) h0 (h_checks[0], h_failures[0], h_code[0], h_high[0], h_low[0], h_done[0]);
  bose_single_harness #(.K(16), .R(2)) h1 (h_checks[1], h_failures[1], h_code[1], h_high[1], h_low[1], h_done[1]);
  bose_single_harness #(.K(16), .R(3)) h2 (h_checks[2], h_failures[2], h_code[2], h_high[2], h_low[2], h_done[2]);
  bose_single_harness #(.K(32), .R(2)) h3 (h_checks[3], h_failures[3], h_code[3], h_high[3], h_low[3], h_done[3]);
  bose_single_harness #(.K(32), .R(3)) h4 (h_checks[4], h_failures[4], h_code[4], h_high[4], h_low[4], h_done[4]);
  bose_single_harness #(.K(64), .R(4)) h5 (h_checks[5], h_failures[5], h_code[5], h_high[5], h_low[5], h_done[5]);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int iv = 0; iv < 256; iv++)
      for (int cv = 0; cv < 4; cv++)
        for (int k = 0; k < 2; k++) begin
          int z;
          logic e;
          i = 8'(iv); c = 2'(cv); clk = k[0];
          #1;
          z = 0;
          for (int b = 0; b < 8; b++) if (!i[b]) z++;
          if (cv == z % 4) e = clk;
          else             e = (cv > z % 4);
          checks++;
          if (out !== e) begin
            failures++;
            if (failures < 10) $display("FAIL i=%02h c=%0d clk=%0b out=%0b exp=%0b", i, cv, clk, out, e);
          end
        end
    #1;  // let every harness clear its done flag first
    for (int h = 0; h < NH; h++) wait (h_done[h]);
    for (int h = 0; h < NH; h++) begin
      checks += h_checks[h];
      failures += h_failures[h];
      // every size must have seen all three verdicts
      checks++;
      if (h_code[h] == 0 || h_high[h] == 0 || h_low[h] == 0) begin
        failures++;
        $display("FAIL harness %0d missed a case: code=%0d high=%0d low=%0d", h, h_code[h], h_high[h], h_low[h]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
