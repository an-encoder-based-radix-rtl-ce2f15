// tb_odd_multiples: checks 3X, 5X and 7X for a 64-bit multiplicand.
//
// Corner values (0, 1, all ones, single bits) and random values are applied,
// one per clock, and each output is compared with a multiplication by a
// constant done at full width in the testbench.
module tb_odd_multiples;

  localparam int unsigned N = 64;

  logic [N-1:0] x;
  logic [N+2:0] x3, x5, x7;
  logic         clk;
  int unsigned  checks = 0, failures = 0;

  odd_multiples #(.N(N)) dut (.x(x), .x3(x3), .x5(x5), .x7(x7));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] xv);
    logic [N+2:0] xe;
    x = xv;
    @(posedge clk);
    xe = {3'b000, xv};
    checks++;
    if (x3 !== xe * 3 || x5 !== xe * 5 || x7 !== xe * 7) begin
      failures++;
      $display("MISMATCH x=%h: 3X=%h 5X=%h 7X=%h", xv, x3, x5, x7);
    end
  endtask

  initial begin
    apply('0);
    apply(64'd1);
    apply('1);
    for (int i = 0; i < int'(N); i++) apply(64'd1 << i);
    for (int n = 0; n < 2000; n++) apply({$urandom(), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
