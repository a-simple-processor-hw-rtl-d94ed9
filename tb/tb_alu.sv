// tb_alu: self-checking test of the 16-bit ALU. For ADD, SUB, AND and OR the
// result, zero flag and signed overflow flag are compared with values
// computed from 32-bit signed arithmetic, on directed corner cases (zero
// result, both overflow directions) and random operands.
module tb_alu;
  import hw_isa_pkg::*;
  logic [15:0] a, b, result;
  alu_op_e     op;
  logic        zero, overflow;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_zero = 0;

  alu #(.WIDTH(16)) dut (.a, .b, .op, .result, .zero, .overflow);

  task automatic check(input logic [15:0] x, input logic [15:0] y, input alu_op_e o);
    int          sx, sy, full;
    logic [15:0] exp_r;
    logic        exp_v;
    a = x; b = y; op = o; #1;
    sx = int'($signed(x)); sy = int'($signed(y));
    exp_v = 1'b0;
    case (o)
      ALU_ADD: begin full = sx + sy; exp_r = 16'(full); exp_v = (full > 32767) || (full < -32768); end
      ALU_SUB: begin full = sx - sy; exp_r = 16'(full); exp_v = (full > 32767) || (full < -32768); end
      ALU_AND: exp_r = x & y;
      default: exp_r = x | y;
    endcase
    checks++;
    if (result !== exp_r || zero !== (exp_r == 16'h0) || overflow !== exp_v) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h: r=%h z=%b v=%b, expected r=%h z=%b v=%b",
               o.name(), x, y, result, zero, overflow, exp_r, exp_r == 16'h0, exp_v);
    end
    if (exp_v) n_ovf++;
    if (exp_r == 16'h0) n_zero++;
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0001, 16'h0001, ALU_ADD);   // 1 + 1 = 2
    check(16'h0002, 16'h0002, ALU_SUB);   // zero
    check(16'h7FFF, 16'h0001, ALU_ADD);   // positive overflow
    check(16'h8000, 16'hFFFF, ALU_ADD);   // negative overflow
    check(16'h8000, 16'h0001, ALU_SUB);   // overflow on subtract
    check(16'h7FFF, 16'hFFFF, ALU_SUB);   // overflow on subtract
    check(16'h0001, 16'h0002, ALU_SUB);   // 1 - 2 = -1, no overflow
    check(16'h000F, 16'h0104, ALU_AND);   // Exercise 1: 0x0004
    check(16'h00F0, 16'h0F0F, ALU_AND);   // zero from AND
    check(16'h1200, 16'h0034, ALU_OR);
    check(16'h0000, 16'h0000, ALU_OR);
    for (int i = 0; i < 400; i++)
      check(16'($urandom), 16'($urandom), alu_op_e'(i % 4));
    if (n_ovf == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
