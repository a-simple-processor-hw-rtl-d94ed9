// tb_adder: self-checking test of the adder used for PC + 2 and for the
// branch target. Checks PC-style increments, wrap-around at 2^16, negative
// (two's-complement) offsets and random operands against an independently
// computed modulo-2^16 sum.
module tb_adder;
  logic [15:0] a, b, sum;
  int checks = 0, failures = 0;

  adder #(.WIDTH(16)) dut (.a, .b, .sum);

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [16:0] full;
    a = x; b = y; #1;
    full = {1'b0, x} + {1'b0, y};
    checks++;
    if (sum !== full[15:0]) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", x, y, sum, full[15:0]);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000, 16'h0002);           // PC + 2 from 0
    check(16'h0004, 16'h0002);
    check(16'hFFFE, 16'h0002);           // wraps to 0
    check(16'h0006, 16'hFFFC);           // PC+2 + (-2*2)
    check(16'h0004, 16'h0006);           // Exercise 2 branch target 0xA
    repeat (200) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
