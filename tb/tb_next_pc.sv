// tb_next_pc: self-checking test of the next-PC logic. Sequential flow
// (PC + 2), BEQ taken and not taken with positive and negative offsets
// (target PC + 2 + offset*2, offset shifted left by 1), and JMP
// (offset*2, unsigned 12-bit offset) are compared with values computed
// from integers, on directed cases from the ISA examples and at random.
module tb_next_pc;
  logic [15:0] pc, sext_off, pc_next;
  logic [11:0] jmp_off;
  logic        branch, zero, jump;
  int checks = 0, failures = 0;

  next_pc #(.WIDTH(16)) dut (.pc, .sext_off, .jmp_off, .branch, .zero, .jump, .pc_next);

  task automatic check(input int p, input int off4, input int joff, input bit br, input bit z, input bit j);
    int exp;
    pc = 16'(p); sext_off = 16'(off4); jmp_off = 12'(joff);
    branch = br; zero = z; jump = j; #1;
    if (j)            exp = joff * 2;
    else if (br && z) exp = p + 2 + off4 * 2;
    else              exp = p + 2;
    checks++;
    if (pc_next !== 16'(exp)) begin
      failures++;
      $display("FAIL pc=%h off=%0d joff=%0d b=%b z=%b j=%b: %h, expected %h",
               p, off4, joff, br, z, j, pc_next, 16'(exp));
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0, 0, 0, 0);           // PC 0x0 -> 0x2
    check(2, 3, 0, 1, 1, 0);           // BEQ at 0x2, offset 3 taken -> 0xA
    check(2, 3, 0, 1, 0, 0);           // not taken -> 0x4
    check(8, -2, 0, 1, 1, 0);          // BEQ -2 -> 0x6
    check(8, -8, 0, 1, 1, 0);          // most negative offset
    check(2, 7, 0, 0, 1, 0);           // zero without Branch: sequential
    check(8, 0, 1, 0, 0, 1);           // JMP 1 -> 0x2
    check(8, 0, 12'hFFF, 0, 0, 1);     // JMP unsigned 4095 -> 0x1FFE
    for (int i = 0; i < 300; i++)
      check($urandom_range(0, 32767) * 2, $urandom_range(0, 15) - 8, $urandom_range(0, 4095),
            $urandom_range(0, 1), $urandom_range(0, 1), ($urandom_range(0, 3) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
