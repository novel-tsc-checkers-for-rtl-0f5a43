// Totally self-checking checkers for Bose BUED and Bose-Lin t-UED codes.
//
// Three checkers of the same family stand side by side, each with its own
// input word:
//   * bs_*: single output Bose BUED checker (BOSE_K information bits,
//     BOSE_R check bits) clocked directly by sys_clk, with a double-edge
//     sampling flip-flop on sys_clk_dly;
//   * bd_*: double output Bose BUED checker of the same size;
//   * bl_*: double output Bose-Lin checker (BL_K, BL_R >= 4).
// The two double output checkers share one T flip-flop that divides sys_clk
// by two; its output is brought out as half_clk.
//
// Timing: all checkers are combinational. bs_i/bs_c must be stable for a
// whole sys_clk period; bs_s_lo and bs_s_hi hold the two halves of the last
// period, (0,1) meaning a code word. bd_*/bl_* inputs may change every
// sys_clk cycle; their outputs are complementary for a code word and flip
// with half_clk. sys_clk_dly must lag sys_clk by more than the checker
// delay plus the flop setup time and by less than half a period.
// The checkers and their sizes follow the paper; putting them in one top and
// sharing the T flip-flop is this design's choice.
module tsc_checkers_top #(
  parameter int unsigned BOSE_K = 8,
  parameter int unsigned BOSE_R = 2,
  parameter int unsigned BL_K   = 64,
  parameter int unsigned BL_R   = 4
) (
  input  logic              sys_clk,
  input  logic              sys_clk_dly,
  input  logic              rst_n,
  // single output Bose checker
  input  logic [BOSE_K-1:0] bs_i,
  input  logic [BOSE_R-1:0] bs_c,
  output logic              bs_out,
  output logic              bs_q,
  output logic              bs_s_hi,
  output logic              bs_s_lo,
  // double output Bose checker
  input  logic [BOSE_K-1:0] bd_i,
  input  logic [BOSE_R-1:0] bd_c,
  output logic              bd_out1,
  output logic              bd_out2,
  // double output Bose-Lin checker
  input  logic [BL_K-1:0]   bl_i,
  input  logic [BL_R-1:0]   bl_c,
  output logic [1:0]        bl_z,
  // divided clock of the double output checkers
  output logic              half_clk
);

  bose_checker_single #(.K(BOSE_K), .R(BOSE_R)) u_bs (
    .i  (bs_i),
    .c  (bs_c),
    .clk(sys_clk),
    .out(bs_out)
  );

  det_sampler u_det (
    .clk_dly(sys_clk_dly),
    .d      (bs_out),
    .q      (bs_q),
    .s_hi   (bs_s_hi),
    .s_lo   (bs_s_lo)
  );

  tff_divider u_tff (
    .clk  (sys_clk),
    .rst_n(rst_n),
    .q    (half_clk)
  );

  bose_checker_double #(.K(BOSE_K), .R(BOSE_R)) u_bd (
    .i   (bd_i),
    .c   (bd_c),
    .clk (half_clk),
    .out1(bd_out1),
    .out2(bd_out2)
  );

  boselin_checker #(.K(BL_K), .R(BL_R)) u_bl (
    .i  (bl_i),
    .c  (bl_c),
    .clk(half_clk),
    .z  (bl_z)
  );

endmodule
