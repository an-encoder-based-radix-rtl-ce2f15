// tb_pp_gen: checks the one-hot multiplexer and complement stage.
//
// For random 64-bit multiplicands, every digit -8..8 is applied as a
// one-hot select and sign; the exact multiples are computed in the
// testbench. Expected output: |d|*X, bitwise inverted when d < 0, over
// N+3 bits.
module tb_pp_gen;
  import booth_pkg::*;

  localparam int unsigned N = 64;

  logic [N-1:0] x;
  logic [N+2:0] x3, x5, x7, pp;
  booth_digit_t digit;
  logic         clk;
  int unsigned  checks = 0, failures = 0;

  pp_gen #(.N(N)) dut (.x(x), .x3(x3), .x5(x5), .x7(x7), .digit(digit), .pp(pp));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N+2:0] xe, expected;
    for (int n = 0; n < 300; n++) begin
      case (n)
        0: x = '0;
        1: x = '1;
        default: x = {$urandom(), $urandom()};
      endcase
      xe = {3'b000, x};
      x3 = xe * 3;
      x5 = xe * 5;
      x7 = xe * 7;
      for (int d = -8; d <= 8; d++) begin
        int m;
        m = (d < 0) ? -d : d;
        digit.sel = '0;
        if (m != 0) digit.sel[m] = 1'b1;
        digit.neg = (d < 0);
        @(posedge clk);
        expected = xe * (N+3)'(m);
        if (d < 0) expected = ~expected;
        checks++;
        if (pp !== expected) begin
          failures++;
          if (failures <= 10) $display("MISMATCH x=%h d=%0d pp=%h expected=%h", x, d, pp, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
