// tb_weighted_func: a random 48-input 16-output function of weight 255 is
// loaded into the default weighted_func (20 cascade cells + 2 decoder
// elements = 22 elements): the cascade as an exact address generator for
// the 255 input combinations with non-zero output, the decoder with their
// output words (word 0 = 0). Checks every non-zero combination, random and
// one-bit-off other inputs (which must give 0), and the element count.
module tb_weighted_func;
  import cascade_prog_pkg::*;
  localparam int unsigned N = 48, P = 10, Q = 8, U = 16, K = 255;
  localparam int unsigned S = 20, CW = 5, D = 2;

  logic clk = 0;
  logic [N-1:0] x = '0;
  logic [U-1:0] f;
  logic [Q-1:0] index;
  logic c_we = 0, d_we = 0;
  logic [CW-1:0] c_cell = '0;
  logic [P-1:0] c_addr = '0;
  logic [Q-1:0] c_data = '0, d_addr = '0, d_data = '0;
  logic d_sel = 0;
  logic [U-1:0] outv [K+1];
  int checks = 0, failures = 0;
  cascade_image img;

  weighted_func dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [U-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    img = new(N, P, Q);
    check(U'(img.s + (U + Q - 1) / Q), U'(S + D), "element count");
    while (img.vecs.size() < K) begin
      vec_t v;
      v = {$urandom, $urandom} & ((vec_t'(1) << N) - 1);
      if (img.lookup(v) == 0) img.add(v);
    end
    img.build(1'b0);
    outv[0] = '0;
    for (int j = 1; j <= K; j++) outv[j] = U'(1 + $urandom % (2**U - 1));
    for (int c = 0; c < S; c++)
      for (int e = 0; e < 2**P; e++) begin
        @(negedge clk);
        c_we = 1; c_cell = CW'(c); c_addr = P'(e); c_data = Q'(img.tbl[c][e]);
      end
    @(negedge clk); c_we = 0;
    for (int e = 0; e < D; e++)
      for (int i = 0; i < 2**Q; i++) begin
        @(negedge clk);
        d_we = 1; d_sel = e[0]; d_addr = Q'(i);
        d_data = (i <= K) ? outv[i][U-1-e*Q -: Q] : '0;
      end
    @(negedge clk); d_we = 0;
    foreach (img.vecs[j]) begin
      x = N'(img.vecs[j]); #1;
      check(f, outv[j + 1], "non-zero combination");
    end
    for (int i = 0; i < 2000; i++) begin
      vec_t v;
      if (i % 2) v = img.vecs[$urandom % K] ^ (vec_t'(1) << ($urandom % N));
      else       v = {$urandom, $urandom} & ((vec_t'(1) << N) - 1);
      x = N'(v); #1;
      check(f, outv[img.lookup(v)], "other input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
