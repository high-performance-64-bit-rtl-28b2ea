// carry_free_addition: row of modified XOR gates, one per bit.
//
// Bit i of the sum is a[i] ^ b[i] when ctl[i] is low and 1 when ctl[i] is
// high. No carry passes between bits, so every sum bit settles after one
// gate delay. The ctl vector comes from the control block. Combinational.
module carry_free_addition #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] ctl,
  output logic [WIDTH-1:0] sum
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_mxor
    modified_xor u_mxor (
      .a  (a[i]),
      .b  (b[i]),
      .ctl(ctl[i]),
      .sum(sum[i])
    );
  end

endmodule : carry_free_addition
