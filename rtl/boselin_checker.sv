// Double output totally self-checking checker for the Bose-Lin t-UED codes
// with R >= 4 check bits.
//
// For R >= 4 the Bose-Lin check symbol is D + 2^(R-2), with
// D = zeros(I) mod 2^(R-1); written out, C_{R-1} = D_{R-2},
// C_{R-2} = !D_{R-2} and C_{R-3..0} = D_{R-3..0}. The checker therefore
// reuses the double output Bose BUED checker for R-1 check bits, fed with
// D = {C_{R-1}, C_{R-3}..C_0}, and a two-rail checker that merges that
// checker's output pair with the pair (C_{R-1}, C_{R-2}). A code word gives a
// complementary pair z; a wrong D or equal C_{R-1}, C_{R-2} gives z = 00 or
// 11 in both clk phases. The structure follows the paper.
//
// Interface: i[j] = I_{j+1}, c[j] = C_j, clk from a T flip-flop.
// Combinational from all inputs. Needs K >= 2^(R-1).
module boselin_checker #(
  parameter int unsigned K = 64,  // information bits
  parameter int unsigned R = 4    // check bits, at least 4
) (
  input  logic [K-1:0] i,
  input  logic [R-1:0] c,
  input  logic         clk,
  output logic [1:0]   z
);

  if (R < 4) begin : g_size_check
    $error("boselin_checker is for R >= 4; use bose_checker_double for R = 2, 3");
  end

  logic [R-2:0] d;  // check symbol of the inner Bose checker
  logic         out1;
  logic         out2;

  assign d = {c[R-1], c[R-3:0]};

  bose_checker_double #(
    .K(K),
    .R(R - 1)
  ) u_bose (
    .i   (i),
    .c   (d),
    .clk (clk),
    .out1(out1),
    .out2(out2)
  );

  two_rail_checker u_trc (
    .a({out1, out2}),
    .b({c[R-1], c[R-2]}),
    .z(z)
  );

endmodule
