// carry_free_addition_tb: self-check of the row of modified XOR gates.
//
// a, b and ctl are driven independently (ctl is not generated from a and
// b here). Bit i of the expected sum is 1 where ctl[i] is 1 and a[i] ^ b[i]
// elsewhere.
module carry_free_addition_tb;

  localparam int unsigned W = 32;

  logic [W-1:0] a, b, ctl, sum, expected;
  int checks = 0, failures = 0;

  carry_free_addition dut (.a(a), .b(b), .ctl(ctl), .sum(sum));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic [W-1:0] tc);
    a = ta; b = tb_; ctl = tc;
    #1;
    for (int i = 0; i < int'(W); i++)
      expected[i] = tc[i] ? 1'b1 : (ta[i] != tb_[i]);
    checks++;
    if (sum !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h ctl=%h -> sum=%h (want %h)", ta, tb_, tc, sum, expected);
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '0);
    apply('1, '0, '0);
    apply('1, '1, '1);
    for (int n = 0; n < 2000; n++)
      apply(W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : carry_free_addition_tb
