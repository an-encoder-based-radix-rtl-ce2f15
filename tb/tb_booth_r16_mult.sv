// tb_booth_r16_mult: end-to-end test of the multiplier at its default size
// (N = 64, no parameter override).
//
// Each clock applies one operand pair: directed corner cases first (zero,
// one, all ones, single bits, alternating patterns, patterns that make
// every digit -8 or the top digit 16), then random pairs, some with random
// bit densities. The product is compared with a 128-bit reference product.
// Alongside, the digits implied by y are counted, independently of the
// design, so that the run is shown to exercise every mechanism: each digit
// magnitude 1..8 with both signs, the zero digit from 11111, and the top
// row's values 0..16 including those (>= 9) that only exist because the
// unsigned transfer digit is folded in. A mechanism never seen is a failure.
module tb_booth_r16_mult;

  localparam int unsigned N = 64;
  localparam int unsigned R = N / 4;
  localparam int unsigned NRAND = 20000;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p, expected;
  logic           clk;
  int unsigned    checks = 0, failures = 0;

  int unsigned pos_seen [1:8];
  int unsigned neg_seen [1:8];
  int unsigned zero_from_ones;
  int unsigned top_seen [0:16];

  booth_r16_mult dut (.x(x), .y(y), .p(p));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (NRAND + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

  task automatic count_digits(input logic [N-1:0] yv);
    logic [N:0] ye;
    int d;
    ye = {yv, 1'b0};
    for (int i = 0; i < int'(R) - 1; i++) begin
      d = -8 * int'(ye[4*i+4]) + 4 * int'(ye[4*i+3]) + 2 * int'(ye[4*i+2])
          + int'(ye[4*i+1]) + int'(ye[4*i]);
      if (d > 0) pos_seen[d]++;
      if (d < 0) neg_seen[-d]++;
      if (d == 0 && ye[4*i +: 5] == 5'b11111) zero_from_ones++;
    end
    d = 8 * int'(ye[N]) + 4 * int'(ye[N-1]) + 2 * int'(ye[N-2]) + int'(ye[N-3])
        + int'(ye[N-4]);
    top_seen[d]++;
  endtask

  task automatic apply(input logic [N-1:0] xv, input logic [N-1:0] yv);
    x = xv;
    y = yv;
    @(posedge clk);
    expected = {{N{1'b0}}, xv} * {{N{1'b0}}, yv};
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures <= 10)
        $display("MISMATCH x=%h y=%h p=%h expected=%h", xv, yv, p, expected);
    end
    count_digits(yv);
  endtask

  initial begin
    logic [N-1:0] a, b;
    foreach (pos_seen[k]) begin pos_seen[k] = 0; neg_seen[k] = 0; end
    foreach (top_seen[k]) top_seen[k] = 0;
    zero_from_ones = 0;

    // The array must have N/4 rows: maximum column height N/4.
    checks++;
    if (dut.R != N / 4) begin
      failures++;
      $display("array has %0d rows, expected %0d", dut.R, N / 4);
    end

    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply('0, '1);
    apply(64'd1, '1);
    apply('1, 64'd1);
    apply({N/4{4'h8}}, {N/4{4'h8}});
    apply({N/4{4'h7}}, {N/4{4'h7}});
    apply({N/2{2'b10}}, {N/2{2'b01}});
    apply({N/2{2'b01}}, {N/2{2'b10}});
    for (int i = 0; i < int'(N); i++) begin
      apply(64'd1 << i, '1);
      apply('1, 64'd1 << i);
      apply(rand64(), 64'd1 << i);
    end
    // Every value of every digit position.
    for (int v = 0; v < 32; v++)
      for (int i = 0; i < int'(R); i++) begin
        b = rand64();
        b[4*i +: 4] = 4'(v);
        if (i > 0) b[4*i-1] = v[4];
        apply(rand64(), b);
      end
    // Random operands, with varying bit density.
    for (int n = 0; n < int'(NRAND); n++) begin
      a = rand64();
      b = rand64();
      case (n % 4)
        1: begin a &= rand64(); b |= rand64(); end
        2: begin a |= rand64(); b &= rand64(); end
        3: begin a |= rand64(); b |= rand64(); end
        default: ;
      endcase
      apply(a, b);
    end

    // Every mechanism must have been exercised.
    for (int k = 1; k <= 8; k++) begin
      if (pos_seen[k] == 0) begin failures++; $display("digit +%0d never seen", k); end
      if (neg_seen[k] == 0) begin failures++; $display("digit -%0d never seen", k); end
    end
    if (zero_from_ones == 0) begin failures++; $display("zero digit from 11111 never seen"); end
    for (int k = 0; k <= 16; k++)
      if (top_seen[k] == 0) begin failures++; $display("top digit %0d never seen", k); end
    $display("digits: +8 %0d, -8 %0d, zero-from-11111 %0d, top=16 %0d, top>=9 %0d",
             pos_seen[8], neg_seen[8], zero_from_ones, top_seen[16],
             top_seen[9] + top_seen[10] + top_seen[11] + top_seen[12] + top_seen[13]
             + top_seen[14] + top_seen[15] + top_seen[16]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
