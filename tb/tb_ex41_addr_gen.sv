// tb_ex41_addr_gen: applies all 32 inputs to the fixed two-cell 5-input
// generator and compares f with the seven registered vectors (addresses
// 1..7 in order, 0 otherwise). Also checks that the rail y is zero exactly
// for the columns (x1..x4) that hold no registered vector.
module tb_ex41_addr_gen;
  logic clk = 0;
  logic [4:0] x;
  logic [2:0] f, y;
  int checks = 0, failures = 0;

  // registered vectors x1 x2 x3 x4 x5, addresses 1..7
  localparam logic [4:0] REG [7] = '{
    5'b00010, 5'b00101, 5'b01000, 5'b01100, 5'b01110, 5'b01111, 5'b11001};

  ex41_addr_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int unsigned exp;
      bit col_used;
      exp = 0; col_used = 0;
      for (int j = 0; j < 7; j++) begin
        if (REG[j] == 5'(v)) exp = j + 1;
        if (REG[j][4:1] == 4'(v >> 1)) col_used = 1;
      end
      x = 5'(v); #1;
      checks += 2;
      if (f != 3'(exp)) begin
        failures++;
        $display("FAIL x=%b: f=%0d expected %0d", x, f, exp);
      end
      if ((y != 0) != col_used) begin
        failures++;
        $display("FAIL x=%b: rail y=%b", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
