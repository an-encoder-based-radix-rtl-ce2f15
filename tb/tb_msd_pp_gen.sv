// tb_msd_pp_gen: checks the most-significant row of the array.
//
// For random 64-bit multiplicands and all 32 values of the top five
// multiplier bits, the output must equal D*X with
// D = 8*y4 + 4*y3 + 2*y2 + y1 + y0 (0..16), computed in the testbench.
// Every D from 0 to 16 is therefore covered, including the values above 8
// that come from the folded transfer digit.
module tb_msd_pp_gen;

  localparam int unsigned N = 64;

  logic [N-1:0] x;
  logic [N+2:0] x3, x5, x7;
  logic [4:0]   ytop;
  logic [N+3:0] pp;
  logic         clk;
  int unsigned  checks = 0, failures = 0;

  msd_pp_gen #(.N(N)) dut (.x(x), .x3(x3), .x5(x5), .x7(x7), .ytop(ytop), .pp(pp));

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
    logic [N+3:0] xe, expected;
    int d;
    for (int n = 0; n < 200; n++) begin
      case (n)
        0: x = '0;
        1: x = '1;
        default: x = {$urandom(), $urandom()};
      endcase
      xe = {4'b0000, x};
      x3 = (N+3)'(xe * 3);
      x5 = (N+3)'(xe * 5);
      x7 = (N+3)'(xe * 7);
      for (int v = 0; v < 32; v++) begin
        ytop = 5'(v);
        @(posedge clk);
        d = 8 * v[4] + 4 * v[3] + 2 * v[2] + v[1] + v[0];
        expected = xe * (N+4)'(d);
        checks++;
        if (pp !== expected) begin
          failures++;
          if (failures <= 10) $display("MISMATCH x=%h D=%0d pp=%h expected=%h", x, d, pp, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
