// eta_inaccurate_part: lower, carry-free part of the error-tolerant adder.
//
// The control block looks for the most significant bit position where a
// and b are both 1. Above that position each sum bit is the plain XOR of
// the operand bits; from that position down to bit 0 every sum bit is set
// to 1. The part never produces a carry into the accurate part. Its
// result is exact when no position has both bits set, and otherwise lies
// below the true lower sum by less than 2^(k+1), k being that position.
// Combinational; the delay is one pass down the CTL chain plus one gate.
module eta_inaccurate_part #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);

  logic [WIDTH-1:0] ctl;

  control_block #(.WIDTH(WIDTH)) u_ctrl (
    .a  (a),
    .b  (b),
    .ctl(ctl)
  );

  carry_free_addition #(.WIDTH(WIDTH)) u_cfa (
    .a  (a),
    .b  (b),
    .ctl(ctl),
    .sum(sum)
  );

endmodule : eta_inaccurate_part
