// tb_ex43_addr_gen: applies all 32 inputs to the fixed 5-input generator
// whose first cell has a single output and checks f = x3 x4 x5 when
// x1 = x2 = 0 and f = 0 otherwise, and the rail y1.
module tb_ex43_addr_gen;
  logic clk = 0;
  logic [4:0] x;
  logic [2:0] f;
  logic y1;
  int checks = 0, failures = 0;

  ex43_addr_gen dut (.*);

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
      exp = (v < 8) ? v : 0;
      x = 5'(v); #1;
      checks += 2;
      if (f != 3'(exp)) begin
        failures++;
        $display("FAIL x=%b: f=%0d expected %0d", x, f, exp);
      end
      if (y1 != (v < 8)) begin
        failures++;
        $display("FAIL x=%b: y1=%b", x, y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
