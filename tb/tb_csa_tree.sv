// tb_csa_tree: checks the 3:2 carry-save reduction tree.
//
// Trees of 16 rows (the multiplier's size), 17, 5 and 3 rows, all 128 bits
// wide, get the same random rows (sparse, dense and all-ones patterns).
// For each, sum + carry modulo 2^128 must equal the sum of its input rows.
module tb_csa_tree;

  localparam int unsigned W = 128;

  logic [16:0][W-1:0] rows;
  logic [W-1:0]       s16, c16, s17, c17, s5, c5, s3, c3;
  logic               clk;
  int unsigned        checks = 0, failures = 0;

  csa_tree #(.ROWS(16), .W(W)) dut16 (.rows_in(rows[15:0]), .sum(s16), .carry(c16));
  csa_tree #(.ROWS(17), .W(W)) dut17 (.rows_in(rows),       .sum(s17), .carry(c17));
  csa_tree #(.ROWS(5),  .W(W)) dut5  (.rows_in(rows[4:0]),  .sum(s5),  .carry(c5));
  csa_tree #(.ROWS(3),  .W(W)) dut3  (.rows_in(rows[2:0]),  .sum(s3),  .carry(c3));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  task automatic check(input string name, input int unsigned n,
                       input logic [W-1:0] s, input logic [W-1:0] c);
    logic [W-1:0] total;
    total = '0;
    for (int r = 0; r < int'(n); r++) total += rows[r];
    checks++;
    if (s + c !== total) begin
      failures++;
      if (failures <= 10) $display("MISMATCH %s: sum+carry=%h expected=%h", name, s + c, total);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int r = 0; r < 17; r++)
        case (n % 4)
          0: rows[r] = (n < 4) ? '1 : rnd();
          1: rows[r] = rnd() & rnd() & rnd();
          2: rows[r] = rnd() | rnd();
          default: rows[r] = rnd();
        endcase
      @(posedge clk);
      check("16 rows", 16, s16, c16);
      check("17 rows", 17, s17, c17);
      check("5 rows", 5, s5, c5);
      check("3 rows", 3, s3, c3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
