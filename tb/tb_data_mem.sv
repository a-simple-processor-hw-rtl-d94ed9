// tb_data_mem: self-checking test of the byte-addressed, little-endian data
// memory at its full default size. A byte-array reference model in the
// testbench checks the document's examples (storing 1 at 0x0 puts 0x01 at
// 0x0 and 0x00 at 0x1; bytes 0x23, 0x45 at 0x2, 0x3 read as word 0x4523),
// that writes happen only with Write Enable at the clock edge, unaligned
// and wrapping accesses, random traffic, and the debug read port.
module tb_data_mem;
  logic        clk = 0, we = 0;
  logic [15:0] addr = 0, wr_data = 0, rd_data, dbg_addr = 0, dbg_data;
  logic [7:0]  ref_b [int];
  int checks = 0, failures = 0;

  data_mem dut (.clk, .addr, .wr_data, .we, .rd_data, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_word(input logic [15:0] a);
    logic [15:0] a1 = a + 16'd1;
    return {ref_b[int'(a1)], ref_b[int'(a)]};
  endfunction

  task automatic write_word(input logic [15:0] a, input logic [15:0] d);
    we = 1; addr = a; wr_data = d;
    @(posedge clk); #1;
    we = 0;
    ref_b[int'(a)] = d[7:0];
    ref_b[int'(16'(a + 16'd1))] = d[15:8];
  endtask

  task automatic check_word(input logic [15:0] a);
    addr = a; dbg_addr = a; #1;
    checks += 2;
    if (rd_data !== ref_word(a))  begin failures++; $display("FAIL rd [%h]=%h exp %h", a, rd_data, ref_word(a)); end
    if (dbg_data !== ref_word(a)) begin failures++; $display("FAIL dbg [%h]=%h exp %h", a, dbg_data, ref_word(a)); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    write_word(16'h0000, 16'h0001);
    checks += 2;
    addr = 16'h0000; dbg_addr = 16'h0001; #1;
    if (rd_data !== 16'h0001) begin failures++; $display("FAIL store 1 at 0x0"); end
    // low byte at lower address: byte 0x1 read as low byte of word at 0x1
    write_word(16'h0002, 16'h4523);
    dbg_addr = 16'h0002; #1;
    if (dbg_data !== 16'h4523) begin failures++; $display("FAIL word 0x4523"); end
    addr = 16'h0001; #1;
    checks++;
    if (rd_data[7:0] !== 8'h00 || rd_data[15:8] !== 8'h23) begin failures++; $display("FAIL unaligned %h", rd_data); end
    // write enable low: no change
    we = 0; addr = 16'h0002; wr_data = 16'hFFFF;
    @(posedge clk); #1;
    check_word(16'h0002);
    // top of memory wraps
    write_word(16'hFFFF, 16'hA55A);
    check_word(16'hFFFF);
    check_word(16'h0000);
    for (int i = 0; i < 400; i++) write_word(16'($urandom), 16'($urandom));
    foreach (ref_b[a]) if (ref_b.exists(int'(16'(a + 1)))) check_word(16'(a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
