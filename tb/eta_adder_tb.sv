// eta_adder_tb: end-to-end self-check of the 64-bit error-tolerant adder
// at its default parameters (64 bits, split at bit 32).
//
// Reference model, written bit by bit and independent of the RTL:
//   upper 32 bits + cout : exact sum of the upper operand halves, no
//                          carry in from below;
//   lower 32 bits        : scan from bit 31 down; XOR of the operand bits
//                          until the first position where both are 1, then
//                          1 at that position and every position below.
// Besides the bit-exact comparison, each result is checked against the
// true 65-bit sum: it may only fall short, and by less than 2^32.
//
// Mechanisms counted (each must occur at least once):
//   forced   - the control chain fired (a 1/1 pair in the lower half)
//   clean    - no 1/1 pair in the lower half, lower half exact
//   carry    - carry out of the accurate part
//   inexact  - the approximate result differs from the true sum
//   exact    - the approximate result equals the true sum
// The accuracy ACC = 1 - |Rc - Re| / Rc of every nonzero result is also
// tracked and its minimum reported.
module eta_adder_tb;

  localparam int unsigned W = 64;
  localparam int unsigned L = 32;

  logic [W-1:0] a, b, sum, expected;
  logic         cout, exp_cout;
  int checks = 0, failures = 0;
  int n_forced = 0, n_clean = 0, n_carry = 0, n_inexact = 0, n_exact = 0;
  real min_acc = 1.0;

  eta_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    logic [W-L:0] hi;
    logic [W:0]   exact_sum, approx;
    bit stop = 1'b0;
    real acc;
    a = ta; b = tb_;
    #1;
    hi = {1'b0, ta[W-1:L]} + {1'b0, tb_[W-1:L]};
    {exp_cout, expected[W-1:L]} = hi;
    for (int i = int'(L) - 1; i >= 0; i--) begin
      if (ta[i] && tb_[i]) stop = 1'b1;
      expected[i] = stop ? 1'b1 : (ta[i] ^ tb_[i]);
    end
    if (stop) n_forced++; else n_clean++;
    if (exp_cout) n_carry++;

    checks++;
    if ({cout, sum} !== {exp_cout, expected}) begin
      failures++;
      $display("FAIL a=%h b=%h -> cout=%0b sum=%h (want %0b %h)",
               ta, tb_, cout, sum, exp_cout, expected);
    end

    exact_sum = {1'b0, ta} + {1'b0, tb_};
    approx    = {cout, sum};
    checks++;
    if (approx > exact_sum || (exact_sum - approx) >= ((W+1)'(1) << L)) begin
      failures++;
      $display("FAIL error bound a=%h b=%h exact=%h approx=%h", ta, tb_, exact_sum, approx);
    end
    if (approx == exact_sum) n_exact++; else n_inexact++;
    if (exact_sum != 0) begin
      acc = 1.0 - real'(exact_sum - approx) / real'(exact_sum);
      if (acc < min_acc) min_acc = acc;
    end
  endtask

  function automatic logic [W-1:0] rand64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, W'(1));
    apply(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA);  // no 1/1 pair: exact
    apply(64'h8000_0000_8000_0000, 64'h8000_0000_8000_0000);  // top bits of both halves
    apply(64'h0000_0000_FFFF_FFFF, 64'h0000_0000_0000_0001);  // long lower carry dropped
    for (int n = 0; n < 5000; n++)
      case (n % 3)
        0:       apply(rand64(), rand64());
        1:       apply(rand64() & rand64(), rand64() & rand64() & rand64());
        default: apply(rand64(), ~rand64() & {{L{1'b1}}, 32'($urandom)});
      endcase

    $display("mechanisms: forced=%0d clean=%0d carry=%0d inexact=%0d exact=%0d",
             n_forced, n_clean, n_carry, n_inexact, n_exact);
    $display("minimum accuracy over nonzero results: 1 - %g", 1.0 - min_acc);
    if (n_forced == 0)  begin failures++; $display("FAIL control chain never fired"); end
    if (n_clean == 0)   begin failures++; $display("FAIL no clean lower half seen"); end
    if (n_carry == 0)   begin failures++; $display("FAIL carry out never seen"); end
    if (n_inexact == 0) begin failures++; $display("FAIL no inexact result seen"); end
    if (n_exact == 0)   begin failures++; $display("FAIL no exact result seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : eta_adder_tb
