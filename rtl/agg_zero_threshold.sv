// Aggregate-zeroes threshold circuit.
//
// The output goes Low when the number of zeros on x reaches the aggregate
// weight sum(y[j] * V[j]), and is High otherwise. Each y input switches its
// weight V[j] into the threshold, so the threshold can be set at run time by
// other signals. Module A of the checkers is one of these.
//
// The circuit it stands for is ratioed: one equal pMOS pull-up per x input
// that is 0, one nMOS per y input sized as V[j] pull-ups, and an output
// inverter. Here that comparison is written as an integer compare of the zero
// count with the summed weights. The function follows the paper's
// definition; the weight width VW is this design's choice.
//
// Interface: x[j] is X_{j+1}, y[j] is Y_{j+1} with weight V[j]. Purely
// combinational.
module agg_zero_threshold #(
  parameter int unsigned N  = 9,  // number of X inputs
  parameter int unsigned Z  = 5,  // number of Y inputs
  parameter int unsigned VW = 8,  // width of one weight
  // weights, V[j] belongs to y[j]; default is Module A for k=8, r=2:
  // y = {1, C_1, C_0, O_2, O_1} weighted {1, 2, 1, 4, 4}
  parameter logic [Z-1:0][VW-1:0] V = {8'd1, 8'd2, 8'd1, 8'd4, 8'd4}
) (
  input  logic [N-1:0] x,
  input  logic [Z-1:0] y,
  output logic         out
);

  // wide enough for the sum of all weights
  localparam int unsigned SW = VW + $clog2(Z + 1) + 1;
  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] zeros;
  logic [SW-1:0] weight;

  always_comb begin
    zeros = '0;
    for (int unsigned j = 0; j < N; j++) begin
      zeros = zeros + CW'(!x[j]);
    end
  end

  always_comb begin
    weight = '0;
    for (int unsigned j = 0; j < Z; j++) begin
      if (y[j]) weight = weight + SW'(V[j]);
    end
  end

  assign out = !(32'(zeros) >= 32'(weight));

endmodule
