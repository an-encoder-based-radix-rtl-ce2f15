// tb_booth_r16_mult_sizes: the multiplier at other operand widths.
//
// The array construction works for any N that is a multiple of 4 and at
// least 12. Instances with N = 32, 16 and 12 (8, 4 and 3 partial-product
// rows) get random operands, with the top multiplier bits forced in a
// quarter of the cases so that the folded top digit reaches 16, and every
// product is compared with a full-width reference. The N = 12 instance is
// additionally checked exhaustively over all multipliers for a set of
// multiplicands.
module tb_booth_r16_mult_sizes;

  logic [31:0] x32, y32;
  logic [63:0] p32;
  logic [15:0] x16, y16;
  logic [31:0] p16;
  logic [11:0] x12, y12;
  logic [23:0] p12;
  logic        clk;
  int unsigned checks = 0, failures = 0;

  booth_r16_mult #(.N(32)) dut32 (.x(x32), .y(y32), .p(p32));
  booth_r16_mult #(.N(16)) dut16 (.x(x16), .y(y16), .p(p16));
  booth_r16_mult #(.N(12)) dut12 (.x(x12), .y(y12), .p(p12));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    logic [63:0] e32;
    logic [31:0] e16;
    logic [23:0] e12;
    e32 = {32'd0, x32} * {32'd0, y32};
    e16 = {16'd0, x16} * {16'd0, y16};
    e12 = {12'd0, x12} * {12'd0, y12};
    checks += 3;
    if (p32 !== e32) begin
      failures++;
      if (failures <= 10) $display("MISMATCH N=32 x=%h y=%h p=%h", x32, y32, p32);
    end
    if (p16 !== e16) begin
      failures++;
      if (failures <= 10) $display("MISMATCH N=16 x=%h y=%h p=%h", x16, y16, p16);
    end
    if (p12 !== e12) begin
      failures++;
      if (failures <= 10) $display("MISMATCH N=12 x=%h y=%h p=%h", x12, y12, p12);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      x32 = (n == 0) ? '1 : $urandom();
      y32 = (n == 0) ? '1 : $urandom();
      x16 = 16'($urandom());
      y16 = 16'($urandom());
      x12 = 12'($urandom());
      y12 = 12'($urandom());
      if (n % 4 == 1) begin
        y32[31:27] = 5'b11111;
        y16[15:11] = 5'b11111;
        y12[11:7]  = 5'b11111;
      end
      @(posedge clk);
      compare();
    end
    for (int xv = 0; xv < 8; xv++)
      for (int yv = 0; yv < 4096; yv++) begin
        x12 = (xv == 0) ? 12'hfff : 12'($urandom());
        y12 = 12'(yv);
        @(posedge clk);
        compare();
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
