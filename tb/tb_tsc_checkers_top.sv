// End-to-end testbench for tsc_checkers_top at its default sizes (Bose
// checkers k=8, r=2; Bose-Lin checker k=64, r=4).
//
// sys_clk has a 10 ns period; sys_clk_dly lags it by 2 ns. A new word goes
// to each checker 0.5 ns after every rising edge of sys_clk, so each word
// sees the high half and then the low half of one period.
//   * single output checker: after the falling edge of sys_clk_dly the
//     sampled pair (s_lo, s_hi) must be (0,1) for a code word, (1,1) for a
//     check symbol that is too large and (0,0) for one that is too small;
//     q must equal s_hi in the high half and s_lo in the low half.
//   * double output checker: (out1, out2) = (!half_clk, half_clk) for a
//     code word, (1,1) or (0,0) otherwise.
//   * Bose-Lin checker: z complementary for a code word and not
//     complementary for a wrong check symbol, for a broken (C_3, C_2) pair
//     and for a unidirectional error of up to 6 bits.
//   * half_clk is 0 in reset and toggles on every sys_clk rising edge.
// Each of these cases is counted and must occur at least once.
module tb_tsc_checkers_top;

  localparam int BK = 8;   // defaults of tsc_checkers_top
  localparam int BR = 2;
  localparam int LK = 64;
  localparam int LR = 4;
  localparam int LT = 2 ** (LR - 2) + LR - 2;  // 6 unidirectional errors
  localparam int CYCLES = 3000;

  logic          sys_clk = 1'b0;
  logic          sys_clk_dly = 1'b0;
  logic          rst_n = 1'b0;
  logic [BK-1:0] bs_i, bd_i;
  logic [BR-1:0] bs_c, bd_c;
  logic          bs_out, bs_q, bs_s_hi, bs_s_lo;
  logic          bd_out1, bd_out2;
  logic [LK-1:0] bl_i;
  logic [LR-1:0] bl_c;
  logic [1:0]    bl_z;
  logic          half_clk;

  tsc_checkers_top dut (.*);

  always #5 sys_clk = ~sys_clk;
  always @(sys_clk) sys_clk_dly <= #2 sys_clk;

  int checks = 0;
  int failures = 0;
  // how often each case happened
  int n_bs_code, n_bs_high, n_bs_low;
  int n_bd_code0, n_bd_code1, n_bd_high, n_bd_low;
  int n_bl_code, n_bl_dbad, n_bl_pair, n_bl_unidir;
  int n_reset, n_toggle;

  initial begin
    #((CYCLES + 50) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic int zeros8(input logic [BK-1:0] v);
    int n = 0;
    for (int b = 0; b < BK; b++) if (!v[b]) n++;
    return n;
  endfunction

  function automatic int zeros64(input logic [LK-1:0] v);
    int n = 0;
    for (int b = 0; b < LK; b++) if (!v[b]) n++;
    return n;
  endfunction

  function automatic logic [LR-1:0] bl_symbol(input logic [LK-1:0] v);
    return LR'((zeros64(v) % (2 ** (LR - 1))) + 2 ** (LR - 2));
  endfunction

  // random word with a zero count spread evenly over 0..n
  function automatic logic [LK-1:0] spread_word(input int n);
    logic [LK-1:0] w;
    int z, cnt, p;
    w = '1;
    z = $urandom_range(n, 0);
    cnt = 0;
    while (cnt < z) begin
      p = $urandom_range(n - 1, 0);
      if (w[p]) begin w[p] = 1'b0; cnt++; end
    end
    return w;
  endfunction

  initial begin
    int bs_kind, bd_kind, bl_kind;   // 0 code word, 1/2 error cases, 3 unidirectional
    int bs_cs, bd_cs;
    logic exp_half;
    bs_i = '1; bs_c = '0; bd_i = '1; bd_c = '0; bl_i = '1; bl_c = bl_symbol('1);
    #23;
    check(half_clk == 1'b0, "half_clk held at 0 in reset");
    n_reset++;
    @(negedge sys_clk);
    rst_n = 1'b1;
    exp_half = 1'b0;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(posedge sys_clk);
      #0.5;
      exp_half = ~exp_half;
      check(half_clk == exp_half, "half_clk toggles every cycle");
      n_toggle++;

      // single output Bose checker
      bs_i = BK'(spread_word(BK));
      bs_cs = zeros8(bs_i) % (2 ** BR);
      bs_kind = $urandom_range(1, 0);
      if (bs_kind == 0) bs_c = BR'(bs_cs);
      else begin
        int bad;
        do bad = $urandom_range(2 ** BR - 1, 0); while (bad == bs_cs);
        bs_c = BR'(bad);
      end

      // double output Bose checker
      bd_i = BK'(spread_word(BK));
      bd_cs = zeros8(bd_i) % (2 ** BR);
      bd_kind = $urandom_range(1, 0);
      if (bd_kind == 0) bd_c = BR'(bd_cs);
      else begin
        int bad;
        do bad = $urandom_range(2 ** BR - 1, 0); while (bad == bd_cs);
        bd_c = BR'(bad);
      end

      // double output Bose-Lin checker
      bl_i = spread_word(LK);
      bl_c = bl_symbol(bl_i);
      bl_kind = $urandom_range(3, 0);
      if (bl_kind == 1) begin        // wrong D, valid (C_3, C_2) pair
        logic [LR-1:0] good;
        good = bl_c;
        do bl_c = LR'($urandom()); while (bl_c == good || bl_c[LR-1] == bl_c[LR-2]);
      end else if (bl_kind == 2) begin  // (C_3, C_2) not complementary
        bl_c[LR-2] = bl_c[LR-1];
      end else if (bl_kind == 3) begin  // unidirectional error of 1..6 bits
        logic [LK+LR-1:0] w, e;
        int ne, cnt, p;
        logic v;
        w = {bl_c, bl_i};
        e = w;
        v = 1'($urandom());
        ne = $urandom_range(LT, 1);
        cnt = 0;
        for (int tries = 0; cnt < ne && tries < 1000; tries++) begin
          p = $urandom_range(LK + LR - 1, 0);
          if (e[p] == v) begin e[p] = !v; cnt++; end
        end
        if (e == w) bl_kind = 0;
        {bl_c, bl_i} = e;
      end

      // high half of the period
      #1.0;
      check(bd_out1 == bd_out2 ? bd_kind != 0 : bd_kind == 0, "double: pair validity (high half)");
      if (bd_kind == 0) check(bd_out2 == half_clk && bd_out1 == !half_clk, "double: code word value");
      check((bl_z[1] ^ bl_z[0]) == (bl_kind == 0), "Bose-Lin: pair validity");
      #1.0;  // after the rising edge of sys_clk_dly
      check(bs_q == bs_s_hi, "DET q follows the rising-edge sample");

      // low half, after the falling edge of sys_clk_dly
      #5.0;
      check(bs_q == bs_s_lo, "DET q follows the falling-edge sample");
      if (bs_kind == 0) begin
        check(bs_s_lo == 1'b0 && bs_s_hi == 1'b1, "single: code word gives (0,1)");
        n_bs_code++;
      end else if (bs_c > BR'(bs_cs)) begin
        check(bs_s_lo == 1'b1 && bs_s_hi == 1'b1, "single: large check symbol gives (1,1)");
        n_bs_high++;
      end else begin
        check(bs_s_lo == 1'b0 && bs_s_hi == 1'b0, "single: small check symbol gives (0,0)");
        n_bs_low++;
      end
      check(bs_out == 1'b0 ? 1'b1 : bs_kind != 0, "single: live output in low half");

      if (bd_kind == 0) begin
        if (half_clk) n_bd_code1++; else n_bd_code0++;
      end else if (bd_c > BR'(bd_cs)) begin
        check(bd_out1 && bd_out2, "double: large check symbol gives (1,1)");
        n_bd_high++;
      end else begin
        check(!bd_out1 && !bd_out2, "double: small check symbol gives (0,0)");
        n_bd_low++;
      end
      case (bl_kind)
        0: n_bl_code++;
        1: n_bl_dbad++;
        2: n_bl_pair++;
        default: n_bl_unidir++;
      endcase
    end

    $display("cases: single code=%0d high=%0d low=%0d", n_bs_code, n_bs_high, n_bs_low);
    $display("cases: double code(clk=0)=%0d code(clk=1)=%0d high=%0d low=%0d",
             n_bd_code0, n_bd_code1, n_bd_high, n_bd_low);
    $display("cases: Bose-Lin code=%0d wrongD=%0d pair=%0d unidir=%0d",
             n_bl_code, n_bl_dbad, n_bl_pair, n_bl_unidir);
    $display("cases: T flip-flop reset=%0d toggles=%0d", n_reset, n_toggle);
    check(n_bs_code > 0 && n_bs_high > 0 && n_bs_low > 0, "every single-output case seen");
    check(n_bd_code0 > 0 && n_bd_code1 > 0 && n_bd_high > 0 && n_bd_low > 0, "every double-output case seen");
    check(n_bl_code > 0 && n_bl_dbad > 0 && n_bl_pair > 0 && n_bl_unidir > 0, "every Bose-Lin case seen");
    check(n_reset > 0 && n_toggle > 0, "T flip-flop reset and toggle seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
