// booth_r16_encoder: radix-16 (modified) Booth recoder for one digit.
//
// Five multiplier bits, the four bits of the digit and the top bit of the
// digit below (the transfer), give the signed digit
//     d = -8*y[4] + 4*y[3] + 2*y[2] + y[1] + y[0],   d in {-8..8}.
// The digit is delivered as a one-hot magnitude select plus a sign flag,
// which drives the 8:1 one-hot multiplexer of pp_gen directly; an all-zero
// select means "digit is zero" (the multiplexer's implicit zero output).
// The recoder is a few gates of logic and depends only on the multiplier,
// so it works in parallel with the odd-multiple adders and is off the
// critical path.
//
// Interface: y[4:0] = {y(4i+3), y(4i+2), y(4i+1), y(4i), y(4i-1)};
// digit.sel[k] = 1 when |d| = k; digit.neg = 1 when d < 0.
// Timing: purely combinational.
//
// The five-bit window, the one-hot output and the implicit zero follow the
// original design. Forcing neg to 0 for the zero digit produced by 11111 is
// a choice made here, so that a zero digit always gives an all-zero row.
module booth_r16_encoder
  import booth_pkg::*;
(
  input  logic [4:0]   y,
  output booth_digit_t digit
);

  logic [3:0] t;    // positive part 4*y3 + 2*y2 + y1 + y0, 0..8
  logic [3:0] mag;  // |d|, 0..8

  always_comb begin
    t   = {1'b0, y[3:1]} + {3'b000, y[0]};
    mag = y[4] ? 4'd8 - t : t;
    for (int k = 1; k <= 8; k++) digit.sel[k] = (mag == 4'(k));
    digit.neg = y[4] && (mag != 4'd0);
  end

endmodule
