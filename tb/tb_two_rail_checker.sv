// Testbench for two_rail_checker: all 16 input combinations. The output
// pair must be complementary exactly when both input pairs are, and for
// valid inputs z[1] must equal a[1] XNOR b[1].
module tb_two_rail_checker;

  logic [1:0] a, b, z;
  int         checks = 0;
  int         failures = 0;

  two_rail_checker dut (.a(a), .b(b), .z(z));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic a_ok, b_ok;
      {a, b} = 4'(v);
      #1;
      a_ok = a[1] ^ a[0];
      b_ok = b[1] ^ b[0];
      checks++;
      if ((z[1] ^ z[0]) !== (a_ok & b_ok)) begin
        failures++;
        $display("FAIL a=%b b=%b z=%b", a, b, z);
      end
      if (a_ok && b_ok) begin
        checks++;
        if (z[1] !== ~(a[1] ^ b[1])) begin
          failures++;
          $display("FAIL value a=%b b=%b z=%b", a, b, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
