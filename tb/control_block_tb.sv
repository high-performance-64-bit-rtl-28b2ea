// control_block_tb: self-check of the CTL chain at its default width.
//
// The expected CTL vector is built from the position k of the most
// significant bit where a and b are both 1: ctl[i] must be 1 for i <= k
// and 0 above; with no such position ctl must be all zeros. Operands are
// drawn sparse (few ones) as well as dense so that k lands everywhere.
module control_block_tb;

  localparam int unsigned W = 32;

  logic [W-1:0] a, b, ctl, expected;
  int checks = 0, failures = 0;
  int hits_none = 0, hits_some = 0;

  control_block dut (.a(a), .b(b), .ctl(ctl));

  function automatic logic [W-1:0] ref_ctl(input logic [W-1:0] x, input logic [W-1:0] y);
    int k = -1;
    logic [W-1:0] r = '0;
    for (int i = 0; i < int'(W); i++)
      if (x[i] && y[i]) k = i;
    for (int i = 0; i <= k; i++) r[i] = 1'b1;
    return r;
  endfunction

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    a = ta; b = tb_;
    #1;
    expected = ref_ctl(ta, tb_);
    checks++;
    if (expected == '0) hits_none++; else hits_some++;
    if (ctl !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h -> ctl=%h (want %h)", ta, tb_, ctl, expected);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}});
    apply(W'(1), W'(1));
    for (int k = 0; k < int'(W); k++)      // a single 1/1 pair at every position
      apply(W'(1) << k, (W'(1) << k) | W'($urandom & ((1 << k) - 1)));
    for (int n = 0; n < 2000; n++)
      if (n % 2 == 0) apply(W'($urandom), W'($urandom));
      else            apply(W'($urandom & $urandom & $urandom), W'($urandom & $urandom));
    if (hits_none == 0 || hits_some == 0) begin
      failures++;
      $display("FAIL coverage: none=%0d some=%0d", hits_none, hits_some);
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

endmodule : control_block_tb
