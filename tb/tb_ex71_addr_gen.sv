// tb_ex71_addr_gen: applies all 2048 inputs to the fixed 11-input
// generator and compares f with the registered-vector list (address j for
// the j-th vector, 0 for all others). Counts the inputs for which the
// cascade's temporary address was non-zero but wrong, so that the
// auxiliary memory and coincidence circuit had to force 0; that must occur.
module tb_ex71_addr_gen;
  logic clk = 0;
  logic [10:0] x;
  logic [3:0]  f, z;
  int checks = 0, failures = 0, rejected = 0, hits = 0;

  // registered vectors x1..x11 in address order 1..15
  localparam logic [10:0] REG [15] = '{
    11'b00100101100, 11'b00111110101, 11'b00111110110, 11'b01001100101,
    11'b01001101111, 11'b10000100100, 11'b10001100101, 11'b10001101001,
    11'b10001101111, 11'b10100001001, 11'b10100100100, 11'b11000110101,
    11'b11001001111, 11'b11010000000, 11'b11010001001};

  ex71_addr_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      int unsigned exp;
      exp = 0;
      for (int j = 0; j < 15; j++) if (REG[j] == 11'(v)) exp = j + 1;
      x = 11'(v); #1;
      checks++;
      if (f != 4'(exp)) begin
        failures++;
        $display("FAIL x=%b: f=%0d expected %0d", x, f, exp);
      end
      if (exp != 0) hits++;
      if (exp == 0 && z != 0) rejected++;
    end
    $display("hits %0d, rejected temporary addresses %0d", hits, rejected);
    checks++;
    if (rejected == 0 || hits != 15) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
