// tb_mux2: self-checking test of the two-input multiplexer used for the
// write-address, ALU-source, write-back and branch choices. Both select
// values are checked at the 4-bit and 16-bit widths the datapath uses.
module tb_mux2;
  logic [15:0] d0, d1, y;
  logic [3:0]  n0, n1, ny;
  logic        sel;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(16)) dut16 (.d0, .d1, .sel, .y);
  mux2 #(.WIDTH(4))  dut4  (.d0(n0), .d1(n1), .sel, .y(ny));

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0 = 16'($urandom); d1 = 16'($urandom);
      n0 = 4'($urandom);  n1 = 4'($urandom);
      if (d0 == d1) d1 = ~d0;
      if (n0 == n1) n1 = ~n0;
      sel = i[0];
      #1;
      checks += 2;
      if (y  !== (i[0] ? d1 : d0)) begin failures++; $display("FAIL 16-bit sel=%0d", sel); end
      if (ny !== (i[0] ? n1 : n0)) begin failures++; $display("FAIL 4-bit sel=%0d", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
