// Self-test set of the Bose checkers at the sizes for which the test set
// size is quoted: (k, r) = (32, 2), (32, 3), (64, 4), plus the 8-bit checker
// (8, 2), for the single output checker (h0..h3) and the double output
// checker (h4..h7). For each checker the fault-free circuit must accept
// every word of the set, and every single stuck-at fault on the threshold
// lines O_1..O_l, on the outputs (and, for the double output checker, on the
// inverted clk) must be caught by at least one word. The size of each set
// is printed. See test_set_harness for how the set is built.
module tb_bose_test_set;

  int checks = 0;
  int failures = 0;

  localparam int NH = 8;
  int   h_checks[NH], h_failures[NH], h_words[NH], h_faults[NH], h_det[NH];
  logic h_done[NH];

  test_set_harness #(.K(8),  .R(2)) h0 (h_checks[0], h_failures[0], h_words[0], h_faults[0], h_det[0], h_done[0]);
  test_set_harness #(.K(32), .R(2)) h1 (h_checks[1], h_failures[1], h_words[1], h_faults[1], h_det[1], h_done[1]);
  test_set_harness #(.K(32), .R(3)) h2 (h_checks[2], h_failures[2], h_words[2], h_faults[2], h_det[2], h_done[2]);
  test_set_harness #(.K(64), .R(4)) h3 (h_checks[3], h_failures[3], h_words[3], h_faults[3], h_det[3], h_done[3]);
  test_set_double_harness #(.K(8),  .R(2)) h4 (h_checks[4], h_failures[4], h_words[4], h_faults[4], h_det[4], h_done[4]);
  test_set_double_harness #(.K(32), .R(2)) h5 (h_checks[5], h_failures[5], h_words[5], h_faults[5], h_det[5], h_done[5]);
  test_set_double_harness #(.K(32), .R(3)) h6 (h_checks[6], h_failures[6], h_words[6], h_faults[6], h_det[6], h_done[6]);
  test_set_double_harness #(.K(64), .R(4)) h7 (h_checks[7], h_failures[7], h_words[7], h_faults[7], h_det[7], h_done[7]);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;  // let every harness clear its done flag first
    for (int h = 0; h < NH; h++) wait (h_done[h]);
    for (int h = 0; h < NH; h++) begin
      $display("test set %0d: %0d code words, %0d of %0d stuck-at faults detected",
               h, h_words[h], h_det[h], h_faults[h]);
      checks += h_checks[h];
      failures += h_failures[h];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
