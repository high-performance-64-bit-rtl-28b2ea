// modified_xor: one bit of the carry-free addition block.
//
// With ctl low the cell is an ordinary XOR: sum = a ^ b (a one-bit
// addition whose carry is dropped). With ctl high the XOR logic is cut off
// from the supply and the output is pulled up, so sum = 1 whatever a and b
// are. Combinational, no clock. The transistor-level gating of the
// original cell is reproduced only as this logic function.
module modified_xor (
  input  logic a,
  input  logic b,
  input  logic ctl,
  output logic sum
);

  always_comb begin
    if (ctl) sum = 1'b1;
    else     sum = a ^ b;
  end

endmodule : modified_xor
