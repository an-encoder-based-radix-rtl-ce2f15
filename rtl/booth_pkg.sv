// booth_pkg: types shared by the radix-16 Booth multiplier.
//
// A recoded radix-16 Booth digit lies in {-8..8}. The recoder hands it to
// the partial-product generator as a sign-magnitude pair: a one-hot
// magnitude select (bit k set selects k*X, k = 1..8, all zero selects 0)
// and a "neg" flag that asks the generator to complement its output and
// the array to add the two's-complement carry-in. The one-hot form with an
// implicit zero is the one the multiplexer of the original design expects.
package booth_pkg;

  // One recoded digit: neg and one-hot magnitude sel[k] for k*X, k = 1..8.
  typedef struct packed {
    logic       neg;
    logic [8:1] sel;
  } booth_digit_t;

  // Digits needed for an N-bit unsigned multiplier once the top transfer
  // digit is folded into the most-significant digit: one row per digit.
  function automatic int unsigned pp_rows(int unsigned n);
    return n / 4;
  endfunction

endpackage
