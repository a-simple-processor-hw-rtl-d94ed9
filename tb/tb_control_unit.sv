// tb_control_unit: exhaustive self-checking test of the control unit. For
// all 16 opcodes the control word is compared with a table written out
// here from the ISA: which instructions write a register, store to memory,
// load, take the offset as ALU operand, write Rt, branch, jump or halt, and
// which ALU operation each needs. Undefined opcodes must do nothing.
module tb_control_unit;
  import hw_isa_pkg::*;
  logic [3:0] opcode;
  ctrl_t      ctrl, exp;
  int checks = 0, failures = 0;

  control_unit dut (.opcode, .ctrl);

  function automatic ctrl_t expected(input logic [3:0] o);
    ctrl_t c;
    c = '0; c.alu_op = ALU_ADD;
    case (o)
      4'b0010: begin c.reg_write = 1; c.alu_op = ALU_ADD; end
      4'b0011: begin c.reg_write = 1; c.alu_op = ALU_SUB; end
      4'b0100: begin c.reg_write = 1; c.alu_op = ALU_AND; end
      4'b0101: begin c.reg_write = 1; c.alu_op = ALU_OR;  end
      4'b0000: begin c.reg_write = 1; c.mem_to_reg = 1; c.alu_src_imm = 1; c.wr_addr_rt = 1; end
      4'b0001: begin c.mem_store = 1; c.alu_src_imm = 1; end
      4'b0111: begin c.branch = 1; c.alu_op = ALU_SUB; end
      4'b1000: c.jump = 1;
      4'b1111: c.halt = 1;
      default: ;
    endcase
    return c;
  endfunction

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++) begin
      opcode = 4'(o); #1;
      exp = expected(4'(o));
      checks++;
      if (ctrl !== exp) begin
        failures++;
        $display("FAIL opcode %b: ctrl=%b expected %b", opcode, ctrl, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
