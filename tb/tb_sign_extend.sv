// tb_sign_extend: exhaustive self-checking test of the 4-to-16-bit sign
// extender. Every 4-bit offset -8..7 is compared with its 16-bit two's-
// complement value computed as a signed integer.
module tb_sign_extend;
  logic [3:0]  in_val;
  logic [15:0] out_val;
  int checks = 0, failures = 0;

  sign_extend #(.IN_W(4), .OUT_W(16)) dut (.in_val, .out_val);

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -8; v <= 7; v++) begin
      in_val = 4'(v); #1;
      checks++;
      if (out_val !== 16'(v)) begin
        failures++;
        $display("FAIL %0d -> %h", v, out_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
