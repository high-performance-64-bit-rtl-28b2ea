// eta_inaccurate_part_tb: self-check of the carry-free lower part.
//
// Expected result: scan from the top bit down; while the operand bits are
// not both 1 the sum bit is their XOR; at the first 1/1 pair, and at every
// bit below it, the sum bit is 1. The test also checks the error bound of
// the scheme: the approximate value never exceeds the exact sum a + b and
// falls short of it by less than 2^(k+1), k being the first 1/1 position.
module eta_inaccurate_part_tb;

  localparam int unsigned W = 32;

  logic [W-1:0] a, b, sum, expected;
  int checks = 0, failures = 0;
  int exact_cases = 0, forced_cases = 0;

  eta_inaccurate_part dut (.a(a), .b(b), .sum(sum));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    bit stop = 1'b0;
    int k = -1;
    longint unsigned exact, approx;
    a = ta; b = tb_;
    #1;
    for (int i = int'(W) - 1; i >= 0; i--) begin
      if (!stop && ta[i] && tb_[i]) begin
        stop = 1'b1;
        k = i;
      end
      expected[i] = stop ? 1'b1 : (ta[i] ^ tb_[i]);
    end
    if (k < 0) exact_cases++; else forced_cases++;
    checks++;
    if (sum !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h -> sum=%h (want %h)", ta, tb_, sum, expected);
    end
    exact  = longint'(ta) + longint'(tb_);
    approx = longint'(sum);
    checks++;
    if (approx > exact || (exact - approx) >= (64'd1 << (k + 1))) begin
      failures++;
      $display("FAIL error bound a=%h b=%h exact=%0d approx=%0d k=%0d", ta, tb_, exact, approx, k);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '0);
    apply('1, '1);
    apply(32'h5555_5555, 32'hAAAA_AAAA);  // all bits differ: exact
    apply(32'h0000_00C2, 32'h0000_0080);
    for (int n = 0; n < 3000; n++)
      if (n % 2 == 0) apply(W'($urandom), W'($urandom));
      else            apply(W'($urandom & $urandom), W'($urandom & $urandom & $urandom));
    if (exact_cases == 0 || forced_cases == 0) begin
      failures++;
      $display("FAIL coverage: exact=%0d forced=%0d", exact_cases, forced_cases);
    end
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

endmodule : eta_inaccurate_part_tb
