// eta_adder: 64-bit error-tolerant adder (ETA), the top of the design.
//
// The operands are split at bit INACC_WIDTH. The upper WIDTH-INACC_WIDTH
// bits are added exactly by a ripple carry adder whose carry in is 0; its
// carry out is cout. The lower INACC_WIDTH bits are added without any
// carry by the inaccurate part: plain XOR above the highest position where
// both operand bits are 1, and all ones from that position down. Because
// no carry crosses the split, the long carry chain of a 64-bit adder is
// cut in half, at the price of a result that can be too small by less
// than 2^INACC_WIDTH.
//
// Interface: a, b (WIDTH bits) in; sum (WIDTH bits) and cout out. There
// is no carry in. Fully combinational, no clock or reset.
//
// The split into an accurate ripple carry upper part and a carry-free
// lower part follows the source design. Splitting exactly in half is this
// design's choice, taken from the published 8- and 16-bit results.
module eta_adder
  import eta_pkg::*;
#(
  parameter int unsigned WIDTH       = ETA_WIDTH,
  parameter int unsigned INACC_WIDTH = ETA_INACC_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned ACC_WIDTH = WIDTH - INACC_WIDTH;

  // Both parts must hold at least one bit.
  if (INACC_WIDTH < 1 || INACC_WIDTH >= WIDTH) begin : g_bad_split
    $error("eta_adder: INACC_WIDTH=%0d must be in 1..WIDTH-1 (WIDTH=%0d)", INACC_WIDTH, WIDTH);
  end

  // Accurate part: upper bits, exact addition, carry in tied to 0.
  ripple_carry_adder #(.WIDTH(ACC_WIDTH)) u_accurate (
    .a   (a[WIDTH-1:INACC_WIDTH]),
    .b   (b[WIDTH-1:INACC_WIDTH]),
    .cin (1'b0),
    .sum (sum[WIDTH-1:INACC_WIDTH]),
    .cout(cout)
  );

  // Inaccurate part: lower bits, carry-free approximate addition.
  eta_inaccurate_part #(.WIDTH(INACC_WIDTH)) u_inaccurate (
    .a  (a[INACC_WIDTH-1:0]),
    .b  (b[INACC_WIDTH-1:0]),
    .sum(sum[INACC_WIDTH-1:0])
  );

endmodule : eta_adder
