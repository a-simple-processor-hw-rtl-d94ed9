// sign_extend: widens an IN_W-bit two's-complement value to OUT_W bits by
// replicating its top bit.
//
// In the processor it turns the 4-bit signed offset of LW, SW and BEQ
// (instruction bits 3:0) into a 16-bit value for the ALU and for the branch
// target. Purely combinational.
module sign_extend #(
  parameter int unsigned IN_W  = 4,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  in_val,
  output logic [OUT_W-1:0] out_val
);

  always_comb out_val = {{(OUT_W-IN_W){in_val[IN_W-1]}}, in_val};

endmodule
