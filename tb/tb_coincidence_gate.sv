// tb_coincidence_gate: drives the 40-bit coincidence check with equal
// vectors, vectors differing in one random bit and random vectors, and
// checks the match line and that the address passes only on a match.
module tb_coincidence_gate;
  localparam int unsigned N = 40, A = 9;
  logic clk = 0;
  logic [N-1:0] query, reg_data;
  logic [A-1:0] tmp_addr, addr;
  logic         match;
  int checks = 0, failures = 0;

  coincidence_gate dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic m_exp, input logic [A-1:0] a_exp);
    checks++;
    if (match !== m_exp || addr !== a_exp) begin
      failures++;
      $display("FAIL q=%h d=%h t=%h: match %b addr %h, expected %b %h",
               query, reg_data, tmp_addr, match, addr, m_exp, a_exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      query    = {$urandom, $urandom};
      tmp_addr = A'($urandom);
      case (i % 3)
        0: reg_data = query;
        1: reg_data = query ^ (N'(1) << ($urandom % N));
        default: reg_data = {$urandom, $urandom};
      endcase
      #1;
      check(reg_data == query, (reg_data == query) ? tmp_addr : '0);
    end
    // every single-bit difference position
    for (int b = 0; b < N; b++) begin
      query = {$urandom, $urandom}; reg_data = query ^ (N'(1) << b);
      tmp_addr = '1; #1;
      check(1'b0, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
