// eta_pkg: shared sizes of the error-tolerant adder (ETA).
//
// The adder is split into an accurate upper part (a ripple carry adder)
// and an inaccurate lower part (a carry-free adder steered by a control
// chain). ETA_WIDTH is the 64-bit operand width the design is built for.
// The split point, half of the width, is this design's choice: it is the
// split that the published 8-bit and 16-bit simulation results exhibit.
package eta_pkg;

  // Operand width of the full adder.
  localparam int unsigned ETA_WIDTH = 64;

  // Number of low-order bits handled by the inaccurate (carry-free) part.
  localparam int unsigned ETA_INACC_WIDTH = ETA_WIDTH / 2;

endpackage : eta_pkg
