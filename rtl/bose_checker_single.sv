// Single output totally self-checking checker for the Bose burst
// unidirectional error detecting (BUED) code, and for the Bose-Lin t-UED
// codes with r = 2 or 3 check bits, whose check symbol is the same
// C = zeros(I) mod 2^r.
//
// L = floor(K/2^R) threshold circuits M_1..M_L decide whether the
// information word holds at least m*2^R zeros; inverted, their outputs
// O_1..O_L add up to floor(zeros(I)/2^R). Module A then compares
// zeros(I) + !clk with 2^R*sum(O) + C + 1:
//   * code word:            out = clk (0 in the low half of the clock
//                           period, 1 in the high half);
//   * check symbol too big: out = 1 in both halves;
//   * check symbol too small: out = 0 in both halves.
// The result is therefore two-rail encoded in time: (0,1) over one period is
// valid, (0,0) and (1,1) flag an error. The structure follows the paper;
// the threshold circuits are modelled by their logic function.
//
// Interface: i[j] = I_{j+1}, c[j] = C_j, clk is the system clock used as a
// data input. Combinational from all inputs to out, so inputs must be held
// for a whole clock period and the output read in each half (see
// det_sampler).
module bose_checker_single #(
  parameter int unsigned K = 8,  // information bits
  parameter int unsigned R = 2   // check bits
) (
  input  logic [K-1:0] i,
  input  logic [R-1:0] c,
  input  logic         clk,
  output logic         out
);

  localparam int unsigned L = K / (2 ** R);

  if (L < 1) begin : g_size_check
    $error("bose_checker_single needs K >= 2**R");
  end

  logic [L-1:0] m_out;  // outputs of M_1..M_L (Low when reached)
  logic [L-1:0] o;      // O_1..O_L after the inverters

  for (genvar m = 1; m <= L; m++) begin : g_m
    mzero_threshold #(
      .N(K),
      .M(m * (2 ** R))
    ) u_m (
      .x  (i),
      .out(m_out[m-1])
    );
  end

  assign o = ~m_out;

  module_a #(
    .K(K),
    .R(R)
  ) u_a (
    .i     (i),
    .clk_in(clk),
    .o     (o),
    .c     (c),
    .out   (out)
  );

endmodule
