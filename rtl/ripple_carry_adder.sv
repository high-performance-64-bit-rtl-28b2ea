// ripple_carry_adder: WIDTH-bit adder built from a chain of full adders.
//
// Bit i adds a[i], b[i] and the carry out of bit i-1; bit 0 takes cin and
// the carry out of the top bit is cout. This is the accurate (upper) part
// of the error-tolerant adder, chosen for its small area and power.
// Combinational; the worst-case delay is the carry rippling from bit 0 to
// bit WIDTH-1. The default width, 32, is the upper half of the 64-bit
// adder.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // c[i] is the carry into bit i; c[WIDTH] is the carry out.
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];

endmodule : ripple_carry_adder
