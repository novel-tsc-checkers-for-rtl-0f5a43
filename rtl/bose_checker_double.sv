// Double output totally self-checking checker for the Bose BUED code (and
// for the Bose-Lin codes with r = 2 or 3).
//
// The threshold circuits M_1..M_L and their inverted outputs O_1..O_L are
// shared by two copies of Module A. A_2 sees clk, A_1 sees the inverted clk,
// so for a code word A_2 gives out2 = clk and A_1 gives out1 = !clk: the
// pair (out1, out2) is (0,1) while clk = 1 and (1,0) while clk = 0. For a
// non-code word both copies see the same error sign and the pair is (0,0) or
// (1,1). clk is meant to run at half the rate at which words arrive (from a
// T flip-flop, see tff_divider), so that every code value of the pair is
// exercised. The structure follows the paper.
//
// Interface: i[j] = I_{j+1}, c[j] = C_j. Combinational from all inputs.
module bose_checker_double #(
  parameter int unsigned K = 8,  // information bits
  parameter int unsigned R = 2   // check bits
) (
  input  logic [K-1:0] i,
  input  logic [R-1:0] c,
  input  logic         clk,
  output logic         out1,
  output logic         out2
);

  localparam int unsigned L = K / (2 ** R);

  if (L < 1) begin : g_size_check
    $error("bose_checker_double needs K >= 2**R");
  end

  logic [L-1:0] m_out;
  logic [L-1:0] o;
  logic         clk_n;

  for (genvar m = 1; m <= L; m++) begin : g_m
    mzero_threshold #(
      .N(K),
      .M(m * (2 ** R))
    ) u_m (
      .x  (i),
      .out(m_out[m-1])
    );
  end

  assign o     = ~m_out;
  assign clk_n = ~clk;

  module_a #(.K(K), .R(R)) u_a1 (
    .i     (i),
    .clk_in(clk_n),
    .o     (o),
    .c     (c),
    .out   (out1)
  );

  module_a #(.K(K), .R(R)) u_a2 (
    .i     (i),
    .clk_in(clk),
    .o     (o),
    .c     (c),
    .out   (out2)
  );

endmodule
