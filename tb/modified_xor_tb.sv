// modified_xor_tb: exhaustive self-check of the modified XOR cell.
//
// With ctl = 0 the output must be a ^ b; with ctl = 1 it must be 1 for
// every a, b. All eight combinations are applied.
module modified_xor_tb;

  logic a, b, ctl, sum;
  logic expected;
  int checks = 0, failures = 0;

  modified_xor dut (.a(a), .b(b), .ctl(ctl), .sum(sum));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ctl, a, b} = 3'(v);
      #1;
      // Truth table written out: forced high under ctl, else odd parity.
      expected = ctl ? 1'b1 : (a != b);
      checks++;
      if (sum !== expected) begin
        failures++;
        $display("FAIL ctl=%0b a=%0b b=%0b -> sum=%0b", ctl, a, b, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : modified_xor_tb
