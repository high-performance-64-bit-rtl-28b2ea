// control_block: CTL generation for the inaccurate part of the ETA.
//
// Scanning from the top bit of the inaccurate part down to bit 0, the
// block finds the first position where both operand bits are 1 and
// raises ctl there and at every position below it:
//   ctl[i] = (a[i] & b[i]) | ctl[i+1],   with ctl[WIDTH] = 0.
// Positions above the first 1/1 pair keep ctl low. Each bit is one cell
// (an AND of the operand bits combined with the CTL of the cell above),
// so the chain runs from the MSB toward the LSB. Combinational.
module control_block #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] ctl
);

  // chain[i] is CTL_i; chain[WIDTH] is the (inactive) input of the top cell.
  logic [WIDTH:0] chain;

  assign chain[WIDTH] = 1'b0;

  for (genvar i = WIDTH - 1; i >= 0; i--) begin : g_cell
    assign chain[i] = (a[i] & b[i]) | chain[i+1];
  end

  assign ctl = chain[WIDTH-1:0];

endmodule : control_block
