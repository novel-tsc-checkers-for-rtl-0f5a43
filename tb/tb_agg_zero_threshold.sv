// Testbench for agg_zero_threshold at its default size (9 x inputs, weights
// {4,4,1,2,1} on y[0..4]): every x and y combination. The expected output
// compares a bit-by-bit zero count with the weights summed here.
module tb_agg_zero_threshold;

  logic [8:0] x;
  logic [4:0] y;
  logic       out;
  int         checks = 0;
  int         failures = 0;
  int         wts[5] = '{4, 4, 1, 2, 1};

  agg_zero_threshold dut (.x(x), .y(y), .out(out));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < 512; xv++) begin
      for (int yv = 0; yv < 32; yv++) begin
        int z, w;
        logic exp;
        x = 9'(xv);
        y = 5'(yv);
        #1;
        z = 0;
        for (int b = 0; b < 9; b++) if (!x[b]) z++;
        w = 0;
        for (int b = 0; b < 5; b++) if (y[b]) w += wts[b];
        exp = (z >= w) ? 1'b0 : 1'b1;
        checks++;
        if (out !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL x=%03h y=%02h got %0b exp %0b", x, y, out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
