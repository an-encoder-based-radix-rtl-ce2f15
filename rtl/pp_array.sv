// pp_array: assembles the radix-16 partial-product bit array.
//
// Row i (i = 0..R-2, R = N/4) holds the complemented multiple pp_mag[i] at
// bit 4i. Its two's-complement "+1" (neg[i]) is placed at bit 4i in row
// i+1, which is free because row i+1 starts four bits higher. Instead of
// sign-extending each row to 2N bits, a few bits are concatenated on top of
// each row; with s = neg[i] and k = 4i + N + 3 (the row's sign position):
//     row 0       : bits k..k+3 = s,      bit k+4 = ~s
//     rows 1..R-3 : bit k = ~s,           bits k+1..k+3 = 1
//     row R-2     : bit k = ~s,           bits k+1..k+4 = 1 (up to bit 2N-1)
// These bits add up, modulo 2^(2N), to the sum of the sign-extended rows.
// The last row R-1 is the non-negative D*X from msd_pp_gen at bit 4(R-1)
// (bits above 2N-1 dropped) and holds neg[R-2] at bit 4(R-2).
// Every column thus receives at most one bit per row: the maximum column
// height is R = N/4.
//
// Interface: pp_mag[i] (N+3 bits) and neg[i] from pp_gen, top_pp (N+4 bits)
// from msd_pp_gen; rows[R-1:0] (2N bits each), whose sum modulo 2^(2N) is
// the product. Timing: wiring and inverters only. Requires N >= 12, N a
// multiple of 4.
// Concatenating bits instead of sign-extending follows the original design;
// the exact bit patterns and slot positions are this design's own.
module pp_array #(
  parameter int unsigned N = 64,
  localparam int unsigned R = N / 4,
  localparam int unsigned W = 2 * N
) (
  input  logic [R-2:0][N+2:0] pp_mag,
  input  logic [R-2:0]        neg,
  input  logic [N+3:0]        top_pp,
  output logic [R-1:0][W-1:0] rows
);

  initial begin
    assert (N >= 12 && N % 4 == 0)
      else $error("pp_array: N must be a multiple of 4 and at least 12");
  end

  always_comb begin
    rows = '0;
    for (int i = 0; i < int'(R) - 1; i++) begin
      rows[i][4*i +: N+3] = pp_mag[i];
      if (i == 0) begin
        rows[i][N+3 +: 4] = {4{neg[i]}};
        rows[i][N+7]      = ~neg[i];
      end else begin
        rows[i][4*i+N+3]    = ~neg[i];
        rows[i][4*i+N+4 +: 3] = 3'b111;
        if (i == int'(R) - 2) rows[i][4*i+N+7] = 1'b1;
      end
      rows[i+1][4*i] = neg[i];
    end
    rows[R-1][W-1:4*(R-1)] = top_pp[W-1-4*(R-1):0];
  end

endmodule
