// booth_r16_mult: N x N unsigned radix-16 Booth multiplier whose
// partial-product array has N/4 rows (maximum column height N/4).
//
// Data flow, all combinational:
//   1. odd_multiples forms 3X, 5X, 7X with carry-propagate adders while
//      booth_r16_encoder recodes the multiplier, four bits per digit, into
//      one-hot magnitude plus sign (digits 0..N/4-2).
//   2. pp_gen selects k*X with a one-hot 8:1 multiplexer and complements
//      it for a negative digit; msd_pp_gen builds the non-negative top row
//      that also carries the unsigned transfer y(N-1).
//   3. pp_array adds the complement bits and the sign-extension bits,
//      giving N/4 rows of 2N bits.
//   4. csa_tree reduces them to two rows with 3:2 carry-save adders, and
//      final_cpa adds those two.
//
// Interface: x (multiplicand) and y (multiplier), N-bit unsigned;
// p = x*y, 2N bits. Timing: no registers; p is valid one combinational
// delay after x and y.
// Radix-16 recoding with one-hot digits, the 8:1 multiplexer with XOR,
// precomputed odd multiples, concatenated sign-extension bits and a
// carry-save reduction follow the original design, as does the target
// height of N/4 for N = 64. How the transfer digit is absorbed (msd_pp_gen)
// and the unpipelined, flop-free structure are this design's own choices.
module booth_r16_mult
  import booth_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  localparam int unsigned R = pp_rows(N);
  localparam int unsigned W = 2 * N;

  logic [N+2:0]         x3, x5, x7;
  logic [N:0]           yext;      // y with the implicit y(-1) = 0 below it
  booth_digit_t [R-2:0] digit;
  logic [R-2:0][N+2:0]  pp_mag;
  logic [R-2:0]         neg;
  logic [N+3:0]         top_pp;
  logic [R-1:0][W-1:0]  rows;
  logic [W-1:0]         sum, carry;

  assign yext = {y, 1'b0};

  odd_multiples #(.N(N)) u_mult (
    .x  (x),
    .x3 (x3),
    .x5 (x5),
    .x7 (x7)
  );

  for (genvar i = 0; i < R - 1; i++) begin : g_digit
    booth_r16_encoder u_enc (
      .y     (yext[4*i +: 5]),
      .digit (digit[i])
    );

    pp_gen #(.N(N)) u_pp (
      .x     (x),
      .x3    (x3),
      .x5    (x5),
      .x7    (x7),
      .digit (digit[i]),
      .pp    (pp_mag[i])
    );

    assign neg[i] = digit[i].neg;
  end

  msd_pp_gen #(.N(N)) u_msd (
    .x    (x),
    .x3   (x3),
    .x5   (x5),
    .x7   (x7),
    .ytop (yext[N -: 5]),
    .pp   (top_pp)
  );

  pp_array #(.N(N)) u_array (
    .pp_mag (pp_mag),
    .neg    (neg),
    .top_pp (top_pp),
    .rows   (rows)
  );

  csa_tree #(.ROWS(R), .W(W)) u_tree (
    .rows_in (rows),
    .sum     (sum),
    .carry   (carry)
  );

  final_cpa #(.W(W)) u_cpa (
    .a (sum),
    .b (carry),
    .s (p)
  );

endmodule
