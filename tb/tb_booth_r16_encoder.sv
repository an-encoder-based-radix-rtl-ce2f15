// tb_booth_r16_encoder: exhaustive test of the radix-16 Booth recoder.
//
// All 32 five-bit windows are applied, one per clock. The expected digit is
// computed arithmetically, d = -8*y4 + 4*y3 + 2*y2 + y1 + y0, and the
// output must be a one-hot (or all-zero for d = 0) magnitude select with the
// right sign flag; neg must be 0 for every zero digit.
module tb_booth_r16_encoder;
  import booth_pkg::*;

  logic [4:0]   y;
  booth_digit_t digit;
  logic         clk;
  int unsigned  checks = 0, failures = 0;

  booth_r16_encoder dut (.y(y), .digit(digit));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, m;
    logic [8:1] exp_sel;
    for (int v = 0; v < 32; v++) begin
      y = 5'(v);
      @(posedge clk);
      d = -8 * v[4] + 4 * v[3] + 2 * v[2] + v[1] + v[0];
      m = (d < 0) ? -d : d;
      exp_sel = '0;
      if (m != 0) exp_sel[m] = 1'b1;
      checks++;
      if (digit.sel !== exp_sel || digit.neg !== (d < 0)) begin
        failures++;
        $display("MISMATCH y=%b: sel=%b neg=%b, expected digit %0d", y, digit.sel,
                 digit.neg, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
