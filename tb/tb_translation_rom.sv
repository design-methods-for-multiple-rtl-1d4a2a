// tb_translation_rom: loads random 80-bit words into the 9-input
// translation memory, reads every address back, and checks that address 0
// (the "unknown word" address) reads as zero even after a word was written
// there.
module tb_translation_rom;
  localparam int unsigned AW = 9, DW = 80;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, addr = '0;
  logic [DW-1:0] wdata = '0, data;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  translation_rom dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [DW-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      model[a] = {$urandom, $urandom, $urandom};
      @(negedge clk); we = 1; waddr = AW'(a); wdata = model[a];
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 2**AW; a++) begin
      addr = AW'(a); #1;
      check(data, (a == 0) ? '0 : model[a], $sformatf("read %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
