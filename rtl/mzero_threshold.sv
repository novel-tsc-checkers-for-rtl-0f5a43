// m-zeroes threshold circuit.
//
// The output goes Low as soon as at least M of the N inputs are 0, and is
// High otherwise. In the checkers this is the building block M_m that tells
// whether the information word holds at least m*2^r zeros.
//
// The circuit it stands for is ratioed: every input that is 0 turns on one
// equal pMOS pull-up, an always-on nMOS sized between M-1 and M pull-ups
// opposes them, and an inverter restores the level. That analog comparison of conductances is
// written here as what it computes: the zeros are counted and compared with
// M. The function follows the paper's definition; the counting structure is
// this design's own.
//
// Interface: x[j] is input X_{j+1}; out is OUT. Purely combinational, no
// clock.
module mzero_threshold #(
  parameter int unsigned N = 8,  // number of inputs X_1..X_n
  parameter int unsigned M = 4   // threshold m: out is 0 when >= M zeros
) (
  input  logic [N-1:0] x,
  output logic         out
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] zeros;

  always_comb begin
    zeros = '0;
    for (int unsigned j = 0; j < N; j++) begin
      zeros = zeros + CW'(!x[j]);
    end
  end

  assign out = !(32'(zeros) >= M);

endmodule
