// eta_adder_widths_tb: the error-tolerant adder at the smaller widths
// evaluated alongside the 64-bit design: 4, 8, 16 and 32 bits, each split
// in half between the accurate and the inaccurate part.
//
// Part 1 replays the operand/result pairs of the published 4-, 8- and
// 16-bit simulation waveforms; each triple (a, b -> sum, cout) is checked
// as printed. Part 2 compares every width with a bit-level reference
// model on random operands (see eta_adder_tb for the model).
module eta_adder_widths_tb;

  int checks = 0, failures = 0;

  logic [3:0]  a4,  b4,  s4;   logic c4;
  logic [7:0]  a8,  b8,  s8;   logic c8;
  logic [15:0] a16, b16, s16;  logic c16;
  logic [31:0] a32, b32, s32;  logic c32;

  eta_adder #(.WIDTH(4),  .INACC_WIDTH(2))  u4  (.a(a4),  .b(b4),  .sum(s4),  .cout(c4));
  eta_adder #(.WIDTH(8),  .INACC_WIDTH(4))  u8  (.a(a8),  .b(b8),  .sum(s8),  .cout(c8));
  eta_adder #(.WIDTH(16), .INACC_WIDTH(8))  u16 (.a(a16), .b(b16), .sum(s16), .cout(c16));
  eta_adder #(.WIDTH(32), .INACC_WIDTH(16)) u32 (.a(a32), .b(b32), .sum(s32), .cout(c32));

  // Bit-level reference for width w split at l, on up to 32-bit operands.
  function automatic logic [32:0] ref_eta(input logic [31:0] x, input logic [31:0] y,
                                          input int w, input int l);
    logic [32:0] r = '0;
    logic [32:0] hi;
    bit stop = 1'b0;
    hi = (({1'b0, x} >> l) & ((33'd1 << (w - l)) - 1)) + (({1'b0, y} >> l) & ((33'd1 << (w - l)) - 1));
    r  = hi << l;
    for (int i = l - 1; i >= 0; i--) begin
      if (x[i] && y[i]) stop = 1'b1;
      r[i] = stop ? 1'b1 : (x[i] ^ y[i]);
    end
    return r;  // bit w is the carry out
  endfunction

  task automatic check(input string tag, input logic [32:0] got, input logic [32:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", tag, got, want);
    end
  endtask

  task automatic wave4(input logic [3:0] a, input logic [3:0] b, input logic [3:0] s, input logic c);
    a4 = a; b4 = b; #1;
    check("fig 4-bit", 33'({c4, s4}), 33'({c, s}));
  endtask
  task automatic wave8(input logic [7:0] a, input logic [7:0] b, input logic [7:0] s, input logic c);
    a8 = a; b8 = b; #1;
    check("fig 8-bit", 33'({c8, s8}), 33'({c, s}));
  endtask

  initial begin
    // 4-bit waveform: b = 0, sum follows a.
    wave4(4'b0000, 4'b0000, 4'b0000, 1'b0);
    wave4(4'b1000, 4'b0000, 4'b1000, 1'b0);
    wave4(4'b1100, 4'b0000, 4'b1100, 1'b0);
    wave4(4'b0010, 4'b0000, 4'b0010, 1'b0);
    wave4(4'b0001, 4'b0000, 4'b0001, 1'b0);
    // 8-bit waveform.
    wave8(8'b00001010, 8'b00001000, 8'b00001111, 1'b0);
    wave8(8'b01001010, 8'b00001100, 8'b01001111, 1'b0);
    wave8(8'b01100010, 8'b10000110, 8'b11100111, 1'b0);
    wave8(8'b10100010, 8'b10100010, 8'b01000011, 1'b1);
    wave8(8'b10000010, 8'b00100000, 8'b10100010, 1'b0);
    // 16-bit waveform, value at the cursor.
    a16 = 16'b1111000011000010; b16 = 16'b1000000010000000; #1;
    check("fig 16-bit", 33'({c16, s16}), 33'({1'b1, 16'b0111000011111111}));

    // Random operands at every width against the reference model.
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] x, y;
      x = $urandom; y = (n % 2 == 0) ? $urandom : ($urandom & $urandom);
      a4 = x[3:0]; b4 = y[3:0]; a8 = x[7:0]; b8 = y[7:0];
      a16 = x[15:0]; b16 = y[15:0]; a32 = x; b32 = y;
      #1;
      check("rand 4",  33'({c4, s4}),   ref_eta(32'(x[3:0]),  32'(y[3:0]),  4, 2));
      check("rand 8",  33'({c8, s8}),   ref_eta(32'(x[7:0]),  32'(y[7:0]),  8, 4));
      check("rand 16", 33'({c16, s16}), ref_eta(32'(x[15:0]), 32'(y[15:0]), 16, 8));
      check("rand 32", 33'({c32, s32}), ref_eta(x, y, 32, 16));
    end
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

endmodule : eta_adder_widths_tb
