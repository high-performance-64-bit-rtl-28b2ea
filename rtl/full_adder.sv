// full_adder: one-bit full adder, the cell of the accurate part.
//
// sum  = a ^ b ^ cin
// cout = 1 when at least two of a, b, cin are 1 (majority).
//
// Purely combinational, no clock. The original cell is a transistor-level
// full adder; only its logic function is reproduced here, written as the
// usual xor/majority equations.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;  // a and b differ: an incoming carry propagates

  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = (a & b) | (p & cin);
  end

endmodule : full_adder
