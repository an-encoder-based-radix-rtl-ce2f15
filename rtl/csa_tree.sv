// csa_tree: reduces ROWS operands to two with 3:2 carry-save adders.
//
// Each level groups the rows in threes; every group passes through a row of
// full adders (3:2 counters) giving a sum row and a carry row shifted left
// by one bit. Rows left over from the grouping pass to the next level
// unchanged. A level turns C rows into C - floor(C/3), repeated until two
// rows remain; for 16 rows this takes six levels (16, 11, 8, 6, 4, 3, 2).
// The levels are laid out by a generate loop whose row counts come from
// a constant function. All arithmetic is modulo 2^W: carries out of the top
// bit are dropped.
//
// Interface: rows_in[ROWS-1:0] (W bits each); sum and carry whose total,
// modulo 2^W, equals the total of the inputs. Timing: combinational, one
// full-adder delay per level.
// Reducing with 3:2 carry-save adders is one of the options the original
// design names; the row-wise grouping is this design's own choice.
module csa_tree #(
  parameter int unsigned ROWS = 16,
  parameter int unsigned W    = 128
) (
  input  logic [ROWS-1:0][W-1:0] rows_in,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);

  // Rows left after l levels, and the number of levels down to two rows.
  function automatic int unsigned rows_after(int unsigned l);
    int unsigned c = ROWS;
    for (int unsigned i = 0; i < l; i++) c = c - c / 3;
    return c;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned l = 0;
    while (rows_after(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  // stage[l] holds the rows entering level l; rows past the live count are 0.
  logic [LEVELS:0][ROWS-1:0][W-1:0] stage;

  assign stage[0] = rows_in;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned C = rows_after(l);  // live rows in
    localparam int unsigned G = C / 3;          // 3:2 groups

    for (genvar g = 0; g < G; g++) begin : g_csa
      logic [W-1:0] a, b, c;
      assign a = stage[l][3*g];
      assign b = stage[l][3*g+1];
      assign c = stage[l][3*g+2];
      assign stage[l+1][2*g]   = a ^ b ^ c;
      assign stage[l+1][2*g+1] = ((a & b) | (a & c) | (b & c)) << 1;
    end
    for (genvar r = 3 * G; r < C; r++) begin : g_pass
      assign stage[l+1][r-G] = stage[l][r];
    end
    for (genvar r = C - G; r < ROWS; r++) begin : g_idle
      assign stage[l+1][r] = '0;
    end
  end

  assign sum = stage[LEVELS][0];
  if (ROWS >= 2) begin : g_carry
    assign carry = stage[LEVELS][1];
  end else begin : g_no_carry
    assign carry = '0;
  end

endmodule
