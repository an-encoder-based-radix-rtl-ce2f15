// tb_pp_array: checks that the assembled bit array sums to the product.
//
// The testbench does its own radix-16 recoding of a random 64-bit
// multiplier (digits 0..14 signed, top digit 0..16), forms each row's
// complemented multiple and neg bit and the top row D*X, and feeds them to
// the array. The sum of the 16 output rows modulo 2^128 must equal x*y,
// which holds only if every complement bit and every sign-extension bit is
// in the right place. Operands that make all digits negative, all positive
// or all zero are included. The output must also have exactly N/4 rows.
module tb_pp_array;

  localparam int unsigned N = 64;
  localparam int unsigned R = N / 4;
  localparam int unsigned W = 2 * N;

  logic [R-2:0][N+2:0] pp_mag;
  logic [R-2:0]        neg;
  logic [N+3:0]        top_pp;
  logic [R-1:0][W-1:0] rows;
  logic                clk;
  int unsigned         checks = 0, failures = 0;

  pp_array #(.N(N)) dut (.pp_mag(pp_mag), .neg(neg), .top_pp(top_pp), .rows(rows));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N:0]   ye;
    logic [W-1:0] total, expected;
    int d, m;
    ye = {y, 1'b0};
    for (int i = 0; i < int'(R) - 1; i++) begin
      d = -8 * int'(ye[4*i+4]) + 4 * int'(ye[4*i+3]) + 2 * int'(ye[4*i+2])
          + int'(ye[4*i+1]) + int'(ye[4*i]);
      m = (d < 0) ? -d : d;
      pp_mag[i] = (N+3)'({3'b000, x} * (N+3)'(m));
      neg[i] = (d < 0);
      if (d < 0) pp_mag[i] = ~pp_mag[i];
    end
    d = 8 * int'(ye[N]) + 4 * int'(ye[N-1]) + 2 * int'(ye[N-2]) + int'(ye[N-3])
        + int'(ye[N-4]);
    top_pp = {4'b0000, x} * (N+4)'(d);
    @(posedge clk);
    total = '0;
    for (int r = 0; r < int'(R); r++) total += rows[r];
    expected = {{N{1'b0}}, x} * {{N{1'b0}}, y};
    checks++;
    if (total !== expected) begin
      failures++;
      if (failures <= 10) $display("MISMATCH x=%h y=%h sum=%h expected=%h", x, y, total, expected);
    end
  endtask

  initial begin
    checks++;
    if ($size(rows) != int'(N / 4)) begin
      failures++;
      $display("array has %0d rows", $size(rows));
    end
    apply('0, '0);
    apply('1, '1);
    apply('1, {N/4{4'h8}});   // every lower digit -8
    apply('1, {N/4{4'h7}});   // every digit +7
    apply('1, '0);
    apply(64'd1, {N/4{4'hc}});
    for (int n = 0; n < 3000; n++) apply({$urandom(), $urandom()}, {$urandom(), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
