// Testbench for boselin_checker. Harnesses at (k, r) = (64, 4) (the default),
// (8, 4), (16, 4), (32, 5) and (64, 6) apply code words, words with a wrong
// check symbol and words with a unidirectional error of up to 2^(r-2)+r-2
// bits; see boselin_harness for the expected outputs. Each size must have
// seen every case.
module tb_boselin_checker;

  int checks = 0;
  int failures = 0;

  localparam int NH = 5;
  int   h_checks[NH], h_failures[NH], h_code[NH], h_dbad[NH], h_pair[NH], h_uni[NH];
  logic h_done[NH];

  boselin_harness #(.K(64), .R(4)) h0 (h_checks[0], h_failures[0], h_code[0], h_dbad[0], h_pair[0], h_uni[0], h_done[0]);
  boselin_harness #(.K(8),  .R(4)) h1 (h_checks[1], h_failures[1], h_code[1], h_dbad[1], h_pair[1], h_uni[1], h_done[1]);
  boselin_harness #(.K(16), .R(4)) h2 (h_checks[2], h_failures[2], h_code[2], h_dbad[2], h_pair[2], h_uni[2], h_done[2]);
  boselin_harness #(.K(32), .R(5)) h3 (h_checks[3], h_failures[3], h_code[3], h_dbad[3], h_pair[3], h_uni[3], h_done[3]);
  boselin_harness #(.K(64), .R(6)) h4 (h_checks[4], h_failures[4], h_code[4], h_dbad[4], h_pair[4], h_uni[4], h_done[4]);

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
      checks += h_checks[h];
      failures += h_failures[h];
      checks++;
      if (h_code[h] == 0 || h_dbad[h] == 0 || h_pair[h] == 0 || h_uni[h] == 0) begin
        failures++;
        $display("FAIL harness %0d missed a case: code=%0d dbad=%0d pair=%0d unidir=%0d",
                 h, h_code[h], h_dbad[h], h_pair[h], h_uni[h]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
