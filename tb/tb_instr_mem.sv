// tb_instr_mem: self-checking test of the instruction memory at its full
// default size. Loads words through the load port at even byte addresses
// across the whole 64 KiB space and reads them back combinationally by
// byte address, including through the odd address of the same word.
module tb_instr_mem;
  logic        clk = 0, we = 0;
  logic [15:0] rd_addr = 0, rd_data, wr_addr = 0, wr_data = 0;
  logic [15:0] ref_mem [int];
  int checks = 0, failures = 0;

  instr_mem dut (.clk, .rd_addr, .rd_data, .we, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Exercise 0 program, then words spread over the whole address space
    ref_mem[0] = 16'h2112;   // ADD R1, R1, R2
    ref_mem[2] = 16'h1024;   // SW R2, 4(R0)
    ref_mem[4] = 16'hF000;   // HALT
    ref_mem[16'hFFFE] = 16'hBEEF;
    for (int i = 0; i < 500; i++) ref_mem[$urandom_range(3, 32766) * 2] = 16'($urandom);
    foreach (ref_mem[a]) begin
      we = 1; wr_addr = 16'(a); wr_data = ref_mem[a];
      @(posedge clk); #1;
    end
    we = 0;
    foreach (ref_mem[a]) begin
      rd_addr = 16'(a); #1;
      checks++;
      if (rd_data !== ref_mem[a]) begin failures++; $display("FAIL [%h]=%h exp %h", a, rd_data, ref_mem[a]); end
      rd_addr = 16'(a) | 16'h1; #1;
      checks++;
      if (rd_data !== ref_mem[a]) begin failures++; $display("FAIL odd [%h]=%h exp %h", rd_addr, rd_data, ref_mem[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
