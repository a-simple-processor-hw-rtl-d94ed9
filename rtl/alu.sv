// alu: 16-bit arithmetic logic unit of the single-cycle processor.
//
// Performs ADD, SUB (a - b), AND or OR as chosen by the 2-bit ALU operation
// from the control unit. Besides the result it flags "zero" (result is 0,
// used by BEQ, which subtracts the two registers) and "overflow" (signed
// two's-complement overflow of ADD or SUB; 0 for AND and OR). The operation
// set and the two flags follow the document; defining overflow as signed
// overflow is this design's choice. Purely combinational.
module alu
  import hw_isa_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] result,
  output logic             zero,
  output logic             overflow
);

  always_comb begin
    overflow = 1'b0;
    unique case (op)
      ALU_ADD: begin
        result   = a + b;
        overflow = (a[WIDTH-1] == b[WIDTH-1]) && (result[WIDTH-1] != a[WIDTH-1]);
      end
      ALU_SUB: begin
        result   = a - b;
        overflow = (a[WIDTH-1] != b[WIDTH-1]) && (result[WIDTH-1] != a[WIDTH-1]);
      end
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
