// adder: WIDTH-bit binary adder, sum = a + b modulo 2^WIDTH.
//
// The single-cycle datapath has two of these: the "+2" adder that forms
// PC + 2 during instruction fetch, and the branch-target adder that adds the
// shifted branch offset to PC + 2. The carry out is not used by either and is
// dropped (a choice of this design). Purely combinational.
module adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);

  always_comb sum = a + b;

endmodule
