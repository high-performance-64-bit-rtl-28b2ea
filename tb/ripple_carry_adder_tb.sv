// ripple_carry_adder_tb: self-check of the ripple carry adder at its
// default width (32 bits).
//
// Corner cases (all zeros, all ones, a carry rippling through every bit)
// and random operands with random carry in are applied; {cout, sum} must
// equal the wide integer sum a + b + cin.
module ripple_carry_adder_tb;

  localparam int unsigned W = 32;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  logic [W:0]   expected;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    a = ta; b = tb_; cin = tc;
    #1;
    expected = {1'b0, ta} + {1'b0, tb_} + {{W{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0b -> cout=%0b sum=%h (want %h)", ta, tb_, tc, cout, sum, expected);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);            // carry ripples through every bit
    apply('1, '1, 1'b1);
    apply('1, W'(1), 1'b0);
    apply({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, 1'b0);
    for (int n = 0; n < 2000; n++)
      apply(W'($urandom), W'($urandom), 1'($urandom));
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

endmodule : ripple_carry_adder_tb
