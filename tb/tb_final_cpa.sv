// tb_final_cpa: checks the 128-bit carry-propagate adder with corner
// values (carry through every bit, wrap-around) and random operands.
module tb_final_cpa;

  localparam int unsigned W = 128;

  logic [W-1:0] a, b, s;
  logic         clk;
  int unsigned  checks = 0, failures = 0;

  final_cpa #(.W(W)) dut (.a(a), .b(b), .s(s));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] av, input logic [W-1:0] bv);
    logic [W:0] full;
    a = av;
    b = bv;
    @(posedge clk);
    full = {1'b0, av} + {1'b0, bv};
    checks++;
    if (s !== full[W-1:0]) begin
      failures++;
      $display("MISMATCH a=%h b=%h s=%h (carry out %b)", av, bv, s, full[W]);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, 128'd1);
    apply('1, '1);
    for (int i = 0; i < int'(W); i++) apply(~(128'd0) >> (W - 1 - i), 128'd1);
    for (int n = 0; n < 2000; n++)
      apply({$urandom(), $urandom(), $urandom(), $urandom()},
            {$urandom(), $urandom(), $urandom(), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
