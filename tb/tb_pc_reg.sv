// tb_pc_reg: self-checking test of the program counter and halt flag.
// Checks reset to 0x0, one load of pc_next per clock, that a HALT sets
// halted and freezes the PC on the HALT's own address, that the freeze
// lasts, and that reset restarts the counter.
module tb_pc_reg;
  logic        clk = 0, rst_n = 0, halt = 0;
  logic [15:0] pc_next = '0, pc;
  logic        halted;
  int checks = 0, failures = 0;

  pc_reg #(.WIDTH(16)) dut (.clk, .rst_n, .halt, .pc_next, .pc, .halted);

  always #5 clk = ~clk;

  task automatic expect_state(input logic [15:0] p, input logic h, input string what);
    checks++;
    if (pc !== p || halted !== h) begin
      failures++;
      $display("FAIL %s: pc=%h halted=%b, expected %h %b", what, pc, halted, p, h);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc_next = 16'h1234;
    @(posedge clk); #1;
    expect_state(16'h0000, 1'b0, "reset");
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      pc_next = pc + 16'd2;
      @(posedge clk); #1;
      expect_state(16'(2*(i+1)), 1'b0, "increment");
    end
    pc_next = 16'h0100;                  // a jump
    @(posedge clk); #1;
    expect_state(16'h0100, 1'b0, "jump");
    halt = 1; pc_next = 16'h0102;
    @(posedge clk); #1;
    expect_state(16'h0100, 1'b1, "halt");
    halt = 0; pc_next = 16'h0200;
    repeat (5) begin
      @(posedge clk); #1;
      expect_state(16'h0100, 1'b1, "stays halted");
    end
    rst_n = 0;
    @(posedge clk); #1;
    expect_state(16'h0000, 1'b0, "reset after halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
