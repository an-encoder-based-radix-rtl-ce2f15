// final_cpa: carry-propagate adder that turns the carry-save pair from the
// reduction tree into the product.
//
// Interface: a, b (W bits); s = (a + b) mod 2^W. Timing: combinational.
// The adder structure (ripple, prefix, ...) is left to synthesis, a choice
// made here; the original design only calls for a carry-propagate adder.
module final_cpa #(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  assign s = a + b;

endmodule
