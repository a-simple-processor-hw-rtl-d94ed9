// control_unit: decodes the 4-bit opcode of the HW ISA into the control word
// that steers the single-cycle datapath.
//
// It is one combinational truth table. Following the document: Reg Write is
// set for ADD, SUB, AND, OR and LW; Mem Store for SW; the "Mem" bit (memory
// instead of ALU result on the write-back path) for LW; Branch for BEQ; and
// the ALU operation is a translation of the opcode, not the opcode itself.
// LW and SW add the offset to Rs; BEQ subtracts Rt from Rs and branches on
// zero. This design's own additions: the ALU-source and write-address mux
// selects (drawn in the datapath without a named control wire), the Jump and
// Halt bits, and undefined opcodes decoding to a no-operation (no writes,
// PC + 2).
module control_unit
  import hw_isa_pkg::*;
(
  input  logic [3:0] opcode,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl        = '0;
    ctrl.alu_op = ALU_ADD;
    case (opcode)
      OP_ADD:  begin ctrl.reg_write = 1'b1; ctrl.alu_op = ALU_ADD; end
      OP_SUB:  begin ctrl.reg_write = 1'b1; ctrl.alu_op = ALU_SUB; end
      OP_AND:  begin ctrl.reg_write = 1'b1; ctrl.alu_op = ALU_AND; end
      OP_OR:   begin ctrl.reg_write = 1'b1; ctrl.alu_op = ALU_OR;  end
      OP_LW: begin
        ctrl.reg_write   = 1'b1;
        ctrl.mem_to_reg  = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.wr_addr_rt  = 1'b1;
        ctrl.alu_op      = ALU_ADD;
      end
      OP_SW: begin
        ctrl.mem_store   = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.alu_op      = ALU_ADD;
      end
      OP_BEQ: begin
        ctrl.branch = 1'b1;
        ctrl.alu_op = ALU_SUB;
      end
      OP_JMP:  ctrl.jump = 1'b1;
      OP_HALT: ctrl.halt = 1'b1;
      default: ;  // undefined opcode: no operation
    endcase
  end

endmodule
