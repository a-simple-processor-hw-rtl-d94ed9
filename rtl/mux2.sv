// mux2: WIDTH-bit two-input multiplexer, y = sel ? d1 : d0.
//
// The datapath uses four of them: the register write-address choice between
// Rd and Rt, the ALU operand-B choice between a register and the offset, the
// write-back choice between the ALU result and memory read data, and the
// next-PC choice between PC + 2 and the branch target. Which input is 0 and
// which is 1 is fixed by the caller. Purely combinational.
module mux2 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
