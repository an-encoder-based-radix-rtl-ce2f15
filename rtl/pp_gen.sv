// pp_gen: partial-product generator for one radix-16 Booth digit.
//
// A one-hot 8:1 multiplexer picks k*X (k = |d|) from the multiples 1X..8X;
// when no select is active it outputs zero. An XOR stage then complements
// every bit when the digit is negative. The "+1" that completes the two's
// complement is not added here: pp_array places the neg bit in a free slot
// of the next row, and the sign extension is handled there as well.
//
// Interface: x (N bits) and the precomputed x3, x5, x7 (N+3 bits); digit
// from booth_r16_encoder. pp (N+3 bits) = (|d|*X) XOR {neg}; the row's sign
// is digit.neg. Timing: combinational, one AND-OR level plus one XOR after
// the multiples are ready.
// The multiplexer-plus-XOR structure follows the original design.
module pp_gen
  import booth_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]  x,
  input  logic [N+2:0]  x3,
  input  logic [N+2:0]  x5,
  input  logic [N+2:0]  x7,
  input  booth_digit_t  digit,
  output logic [N+2:0]  pp
);

  logic [8:1][N+2:0] mult;  // k*X for k = 1..8
  logic [N+2:0]      mux;

  always_comb begin
    mult[1] = {3'b000, x};
    mult[2] = {2'b00, x, 1'b0};
    mult[3] = x3;
    mult[4] = {1'b0, x, 2'b00};
    mult[5] = x5;
    mult[6] = {x3[N+1:0], 1'b0};
    mult[7] = x7;
    mult[8] = {x, 3'b000};
    mux = '0;
    for (int k = 1; k <= 8; k++) mux |= mult[k] & {(N+3){digit.sel[k]}};
    pp = mux ^ {(N+3){digit.neg}};
  end

endmodule
