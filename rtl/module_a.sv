// Module A: the (2^r,...,2^r, 2^(r-1),...,2^0, 1) aggregate-zeroes threshold
// circuit at the heart of the Bose code checkers.
//
// Its x inputs are the K information bits and the clock input clk_in; its
// weighted y inputs are the L = floor(K/2^R) threshold outputs O_1..O_L
// (weight 2^R each), the check bits C_{R-1}..C_0 (weight 2^j for C_j) and a
// constant 1 (weight 1, the pull-down transistor whose gate is tied high).
// So out is 0 exactly when
//
//   zeros(I) + !clk_in  >=  2^R * sum(O) + C + 1.
//
// With sum(O) = floor(zeros(I)/2^R) the right side is
// zeros(I) - zeros(I) mod 2^R + C + 1, which equals zeros(I) + 1 for a code
// word. The weights and their assignment follow the paper; the port order
// and the weight width are this design's choice.
//
// Interface: i[j] = I_{j+1}, o[m] = O_{m+1}, c[j] = C_j. Combinational.
module module_a #(
  parameter int unsigned K = 8,  // information bits
  parameter int unsigned R = 2   // check bits
) (
  input  logic [K-1:0]        i,
  input  logic                clk_in,
  input  logic [K/(2**R)-1:0] o,
  input  logic [R-1:0]        c,
  output logic                out
);

  localparam int unsigned L  = K / (2 ** R);  // number of O inputs
  localparam int unsigned Z  = L + R + 1;     // number of weighted inputs
  localparam int unsigned VW = R + 1;         // 2^R fits in R+1 bits

  typedef logic [Z-1:0][VW-1:0] weights_t;

  // y[L-1:0] = O, y[L+R-1:L] = C, y[L+R] = constant 1
  function automatic weights_t make_weights();
    weights_t w;
    for (int unsigned j = 0; j < Z; j++) begin
      if (j < L)          w[j] = VW'(2 ** R);
      else if (j < L + R) w[j] = VW'(2 ** (j - L));
      else                w[j] = VW'(1);
    end
    return w;
  endfunction

  localparam weights_t V = make_weights();

  agg_zero_threshold #(
    .N (K + 1),
    .Z (Z),
    .VW(VW),
    .V (V)
  ) u_agg (
    .x  ({clk_in, i}),
    .y  ({1'b1, c, o}),
    .out(out)
  );

endmodule
