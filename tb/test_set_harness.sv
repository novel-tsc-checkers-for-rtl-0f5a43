// Test-set harness for one bose_checker_single of size (K, R).
//
// It builds the self-test set of the checker: for every threshold
// m = 1..L (L = K/2^R), code words with exactly m*2^R - 1 zeros whose ones,
// together, cover every bit position, and code words with exactly m*2^R zeros
// whose zeros cover every bit position. The windows of ones or zeros are
// rotated through the word, so ceil(K/(K-m*2^R+1)) + ceil(K/(m*2^R)) words
// are used per m; a final word with m*2^R - 1 zeros makes each m contain both
// orders of a crossing pair. Every word is applied with its check symbol, in
// the low and then the high clock half.
//
// The set is run once on the fault-free checker (every word must give the
// valid sequence (0,1)), then once per single stuck-at fault on the lines
// O_1..O_L and on the checker output, forced from here. A fault counts as
// detected when some word of the set gives (0,0) or (1,1).
module test_set_harness #(
  parameter int unsigned K = 8,
  parameter int unsigned R = 2
) (
  output int   checks,
  output int   failures,
  output int   n_words,    // size of the test set
  output int   n_faults,   // faults injected
  output int   n_detected, // faults detected by the set
  output logic done
);

  localparam int unsigned L = K / (2 ** R);

  logic [K-1:0] i;
  logic [R-1:0] c;
  logic         clk;
  logic         out;

  bose_checker_single #(.K(K), .R(R)) dut (.i(i), .c(c), .clk(clk), .out(out));

  // fault selection: 0 none, 1 O line stuck-at-0, 2 O line stuck-at-1,
  // 3 output stuck-at-0, 4 output stuck-at-1
  int fault_kind;
  int fault_line;

  // word with exactly nz zeros placed in a window that starts at 'start'
  function automatic logic [K-1:0] zero_window(input int nz, input int start);
    logic [K-1:0] w = '1;
    for (int b = 0; b < nz; b++) w[(start + b) % K] = 1'b0;
    return w;
  endfunction

  // word with exactly nz zeros whose ones sit in a window that starts at 'start'
  function automatic logic [K-1:0] one_window(input int nz, input int start);
    logic [K-1:0] w = '0;
    for (int b = 0; b < K - nz; b++) w[(start + b) % K] = 1'b1;
    return w;
  endfunction

  // apply one code word; returns 1 when the checker output was not (0,1)
  task automatic apply(input logic [K-1:0] w, input int nz, output logic bad);
    logic [L-1:0] o_good;
    logic lo, hi;
    for (int m = 1; m <= L; m++) o_good[m-1] = (nz >= m * (2 ** R));
    i = w;
    c = R'(nz % (2 ** R));
    case (fault_kind)
      1: force dut.o = o_good & ~(L'(1) << fault_line);
      2: force dut.o = o_good | (L'(1) << fault_line);
      3: force dut.out = 1'b0;
      4: force dut.out = 1'b1;
      default: ;
    endcase
    clk = 1'b0; #1 lo = out;
    clk = 1'b1; #1 hi = out;
    bad = !(lo == 1'b0 && hi == 1'b1);
  endtask

  // run the whole test set; returns whether any word was flagged
  task automatic run_set(output logic flagged, output int words);
    logic bad;
    flagged = 1'b0;
    words = 0;
    for (int m = 1; m <= L; m++) begin
      int lo_z, hi_z, n_lo, n_hi;
      hi_z = m * (2 ** R);
      lo_z = hi_z - 1;
      n_lo = (K + (K - lo_z) - 1) / (K - lo_z);  // ceil(K / ones)
      n_hi = (K + hi_z - 1) / hi_z;              // ceil(K / zeros)
      for (int j = 0; j < n_lo; j++) begin
        apply(one_window(lo_z, j * (K - lo_z)), lo_z, bad);
        flagged |= bad; words++;
      end
      for (int j = 0; j < n_hi; j++) begin
        apply(zero_window(hi_z, j * hi_z), hi_z, bad);
        flagged |= bad; words++;
      end
      apply(one_window(lo_z, 0), lo_z, bad);
      flagged |= bad; words++;
    end
  endtask

  initial begin
    logic flagged;
    int   words;
    checks = 0; failures = 0; n_words = 0; n_faults = 0; n_detected = 0;
    done = 1'b0;
    i = '1; c = '0; clk = 1'b0;

    fault_kind = 0; fault_line = 0;
    run_set(flagged, words);
    n_words = words;
    checks++;
    if (flagged) begin
      failures++;
      $display("FAIL (K=%0d,R=%0d) fault-free checker rejected a code word", K, R);
    end

    for (int kind = 1; kind <= 4; kind++) begin
      int lines;
      lines = (kind <= 2) ? L : 1;
      for (int ln = 0; ln < lines; ln++) begin
        fault_kind = kind; fault_line = ln;
        run_set(flagged, words);
        release dut.o;
        release dut.out;
        n_faults++;
        checks++;
        if (flagged) n_detected++;
        else begin
          failures++;
          $display("FAIL (K=%0d,R=%0d) fault kind %0d on line %0d escaped the test set", K, R, kind, ln);
        end
      end
    end
    done = 1'b1;
  end

endmodule
