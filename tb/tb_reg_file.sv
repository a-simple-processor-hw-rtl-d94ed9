// tb_reg_file: self-checking test of the 16 x 16-bit register file against
// a reference array kept in the testbench. Checks the reset state (R1 =
// 0x0001, others 0), that both read ports and the debug port are
// combinational, that a write lands at the clock edge and only when Write
// Enable is high, and random traffic on all ports.
module tb_reg_file;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [3:0]  rd_addr1 = 0, rd_addr2 = 0, wr_addr = 0, dbg_addr = 0;
  logic [15:0] rd_data1, rd_data2, dbg_data, wr_data = 0;
  logic [15:0] ref_regs [16];
  int checks = 0, failures = 0;

  reg_file #(.WIDTH(16), .NREGS(16)) dut (
    .clk, .rst_n, .rd_addr1, .rd_data1, .rd_addr2, .rd_data2,
    .we, .wr_addr, .wr_data, .dbg_addr, .dbg_data
  );

  always #5 clk = ~clk;

  task automatic check_all_reads();
    for (int r = 0; r < 16; r++) begin
      rd_addr1 = 4'(r); rd_addr2 = 4'(15 - r); dbg_addr = 4'(r); #1;
      checks += 3;
      if (rd_data1 !== ref_regs[r])    begin failures++; $display("FAIL port1 R%0d=%h exp %h", r, rd_data1, ref_regs[r]); end
      if (rd_data2 !== ref_regs[15-r]) begin failures++; $display("FAIL port2 R%0d=%h exp %h", 15-r, rd_data2, ref_regs[15-r]); end
      if (dbg_data !== ref_regs[r])    begin failures++; $display("FAIL dbg R%0d=%h exp %h", r, dbg_data, ref_regs[r]); end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    rst_n = 1;
    for (int r = 0; r < 16; r++) ref_regs[r] = (r == 1) ? 16'h0001 : 16'h0000;
    check_all_reads();
    // write with Write Enable low: nothing changes
    we = 0; wr_addr = 4'd5; wr_data = 16'hDEAD;
    @(posedge clk); #1;
    check_all_reads();
    // write becomes visible only after the edge
    we = 1; wr_addr = 4'd2; wr_data = 16'h0002; rd_addr1 = 4'd2; #1;
    checks++;
    if (rd_data1 !== 16'h0000) begin failures++; $display("FAIL write visible before edge"); end
    @(posedge clk); #1;
    ref_regs[2] = 16'h0002; we = 0;
    check_all_reads();
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom); wr_addr = 4'($urandom); wr_data = 16'($urandom);
      rd_addr1 = 4'($urandom); rd_addr2 = 4'($urandom); #1;
      checks += 2;
      if (rd_data1 !== ref_regs[rd_addr1]) begin failures++; $display("FAIL rand port1"); end
      if (rd_data2 !== ref_regs[rd_addr2]) begin failures++; $display("FAIL rand port2"); end
      @(posedge clk); #1;
      if (we) ref_regs[wr_addr] = wr_data;
    end
    we = 0;
    check_all_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
