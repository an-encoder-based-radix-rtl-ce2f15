// msd_pp_gen: most-significant partial product with the transfer digit
// folded in, which removes one row from the partial-product array.
//
// Recoding an N-bit UNSIGNED multiplier into radix-16 Booth digits gives
// N/4 signed digits plus a transfer digit d_T = y(N-1) in {0,1}, i.e.
// N/4 + 1 rows and a maximum column height of N/4 + 1. This unit instead
// produces one row for the sum of the top signed digit and the transfer,
//     D = d(N/4-1) + 16*y(N-1) = 8*y(N-1) + 4*y(N-2) + 2*y(N-3) + y(N-4) + y(N-5),
// which is never negative and lies in 0..16. The row D*X therefore needs
// no complement bit and no sign extension, and the array has exactly N/4
// rows, so its maximum column height is N/4 (16 for N = 64).
//
// D*X is selected by a one-hot 16:1 multiplexer with implicit zero. Besides
// the multiples already built for the other rows, it needs 9X, 11X, 13X and
// 15X; each is formed directly from X (8X+X, 8X+2X+X, 8X+4X+X, 16X-X), so
// they are computed in parallel with 3X/5X/7X and add at most the delay of
// one carry-save level to the multiple generation.
//
// Interface: x (N bits), x3/x5/x7 from odd_multiples, ytop = y[N-1:N-5].
// pp = D*X, N+4 bits. Timing: combinational.
// The result (N/4 rows, maximum height N/4, for unsigned operands) is the
// goal stated for the original design; the folding of the transfer into a
// non-negative top digit and the extra multiples are this design's own way
// of reaching it.
module msd_pp_gen #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] x,
  input  logic [N+2:0] x3,
  input  logic [N+2:0] x5,
  input  logic [N+2:0] x7,
  input  logic [4:0]   ytop,
  output logic [N+3:0] pp
);

  logic [4:0]         d;       // top digit 0..16
  logic [16:1]        sel;     // one-hot |D|
  logic [N+3:0]       xe;
  logic [16:1][N+3:0] mult;    // k*X for k = 1..16
  logic [N+3:0]       x9, x11, x13, x15;

  assign xe  = {4'b0000, x};
  assign x9  = (xe << 3) + xe;
  assign x11 = (xe << 3) + (xe << 1) + xe;
  assign x13 = (xe << 3) + (xe << 2) + xe;
  assign x15 = (xe << 4) - xe;

  always_comb begin
    d = {1'b0, ytop[4:1]} + {4'b0000, ytop[0]};
    for (int k = 1; k <= 16; k++) sel[k] = (d == 5'(k));
  end

  always_comb begin
    mult[1]  = xe;
    mult[2]  = xe << 1;
    mult[3]  = {1'b0, x3};
    mult[4]  = xe << 2;
    mult[5]  = {1'b0, x5};
    mult[6]  = {x3, 1'b0};
    mult[7]  = {1'b0, x7};
    mult[8]  = xe << 3;
    mult[9]  = x9;
    mult[10] = {x5, 1'b0};
    mult[11] = x11;
    mult[12] = {x3[N+1:0], 2'b00};
    mult[13] = x13;
    mult[14] = {x7, 1'b0};
    mult[15] = x15;
    mult[16] = xe << 4;
    pp = '0;
    for (int k = 1; k <= 16; k++) pp |= mult[k] & {(N+4){sel[k]}};
  end

endmodule
