// Testbench for module_a at k=8, r=2: every combination of the information
// bits, clk, O_1..O_2 and C_1..C_0. Expected: out = 0 exactly when
// zeros(I) + !clk >= 4*(O_1+O_2) + 2*C_1 + C_0 + 1.
module tb_module_a;

  logic [7:0] i;
  logic       clk_in;
  logic [1:0] o;
  logic [1:0] c;
  logic       out;
  int         checks = 0;
  int         failures = 0;

  module_a #(.K(8), .R(2)) dut (.i(i), .clk_in(clk_in), .o(o), .c(c), .out(out));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int iv = 0; iv < 256; iv++)
      for (int k = 0; k < 2; k++)
        for (int ov = 0; ov < 4; ov++)
          for (int cv = 0; cv < 4; cv++) begin
            int z, aw;
            logic exp;
            i = 8'(iv); clk_in = k[0]; o = 2'(ov); c = 2'(cv);
            #1;
            z = (k == 0) ? 1 : 0;
            for (int b = 0; b < 8; b++) if (!i[b]) z++;
            aw = 4 * (o[0] + o[1]) + cv + 1;
            exp = (z >= aw) ? 1'b0 : 1'b1;
            checks++;
            if (out !== exp) begin
              failures++;
              if (failures < 10)
                $display("FAIL i=%02h clk=%0d o=%0d c=%0d got %0b exp %0b", i, k, ov, cv, out, exp);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
