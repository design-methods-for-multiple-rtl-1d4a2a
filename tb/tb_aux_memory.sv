// tb_aux_memory: fills a 9-address 40-bit auxiliary memory with random
// registered vectors through its write port and reads every word back
// against a testbench copy. Also checks that a word is not changed while
// we is low and that the old word is read until the write edge.
module tb_aux_memory;
  localparam int unsigned P = 9, Q = 40;
  logic clk = 0, we = 0;
  logic [P-1:0] waddr = '0, addr = '0;
  logic [Q-1:0] wdata = '0, data;
  logic [Q-1:0] model [2**P];
  int checks = 0, failures = 0;

  aux_memory #(.ADDR_W(P), .DATA_W(Q)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [Q-1:0] got, exp, input string what);
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
    for (int a = 0; a < 2**P; a++) begin
      model[a] = Q'($urandom);
      @(negedge clk); we = 1; waddr = P'(a); wdata = model[a];
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 2**P; a++) begin
      addr = P'(a); #1;
      check(data, model[a], $sformatf("read %0d", a));
    end
    // no write while we is low
    @(negedge clk); waddr = 9'd7; wdata = ~model[7]; addr = 9'd7;
    @(negedge clk); check(data, model[7], "we low");
    // old data visible until the write edge, new data after
    we = 1; #1; check(data, model[7], "before edge");
    @(posedge clk); #1; check(data, ~model[7], "after edge");
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
