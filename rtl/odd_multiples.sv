// odd_multiples: precomputation of the hard multiples 3X, 5X and 7X.
//
// Radix-16 digits reach magnitude 8, so the partial-product multiplexer
// needs every multiple 1X..8X. The even ones and 1X are wiring (shifts of
// X or of a smaller odd multiple); the odd ones need a carry-propagate
// addition each, as the original design describes:
//     3X = 2X + X,   5X = 4X + X,   7X = 8X - X.
// The three adders are independent, so the multiple generation costs one
// adder delay; it overlaps with the Booth recoding.
//
// Interface: x is the N-bit unsigned multiplicand; x3, x5, x7 are N+3 bits
// wide (7X < 2^(N+3)); the top bit of x3 is always 0, kept so that the
// three multiples share one width. Timing: combinational.
// The adder architecture is left to synthesis ("+"), a choice made here.
module odd_multiples #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] x,
  output logic [N+2:0] x3,
  output logic [N+2:0] x5,
  output logic [N+2:0] x7
);

  logic [N+2:0] xe;
  assign xe = {3'b000, x};

  assign x3 = (xe << 1) + xe;
  assign x5 = (xe << 2) + xe;
  assign x7 = (xe << 3) - xe;

endmodule
