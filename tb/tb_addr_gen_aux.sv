// tb_addr_gen_aux: loads the default generator (40-bit queries, 9-bit
// addresses, 16 cells of 11 inputs) with 500 registered vectors. The
// cascade is loaded with random values wherever no registered vector
// reaches, i.e. it only realises the function with don't cares, so it
// returns wrong temporary addresses for many unregistered queries. Checks:
//  * every registered vector gives its address and hit;
//  * random and one-bit-off unregistered vectors give 0 and no hit, and
//    the testbench counts how often this needed the auxiliary memory
//    check (temporary address non-zero); that must happen at least once.
module tb_addr_gen_aux;
  import cascade_prog_pkg::*;
  localparam int unsigned N = 40, A = 9, P = 11, K = 500;
  localparam int unsigned S = 16, CW = 4;

  logic clk = 0;
  logic [N-1:0] query = '0;
  logic [A-1:0] addr, tmp_addr;
  logic hit;
  logic c_we = 0, a_we = 0;
  logic [CW-1:0] c_cell = '0;
  logic [P-1:0] c_addr = '0;
  logic [A-1:0] c_data = '0, a_addr = '0;
  logic [N-1:0] a_data = '0;
  int checks = 0, failures = 0, rejected = 0;
  cascade_image img;

  addr_gen_aux dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int unsigned got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic vec_t new_vec(cascade_image im);
    vec_t v, m;
    int unsigned keep;
    forever begin
      v = {$urandom, $urandom} & ((vec_t'(1) << N) - 1);
      if (im.vecs.size() > 0 && ($urandom % 4) != 0) begin
        keep = 2 + $urandom % (N - 4);
        m = ((vec_t'(1) << keep) - 1) << (N - keep);
        v = (im.vecs[$urandom % im.vecs.size()] & m) | (v & ~m);
      end
      if (im.lookup(v) == 0) return v;
    end
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    img = new(N, P, A);
    check(img.s, S, "cell count");
    for (int j = 0; j < K; j++) img.add(new_vec(img));
    img.build(1'b1);
    for (int c = 0; c < S; c++)
      for (int e = 0; e < 2**P; e++) begin
        @(negedge clk);
        c_we = 1; c_cell = CW'(c); c_addr = P'(e); c_data = A'(img.tbl[c][e]);
      end
    @(negedge clk); c_we = 0;
    for (int a = 0; a < 2**A; a++) begin
      @(negedge clk);
      a_we = 1; a_addr = A'(a);
      a_data = (a >= 1 && a <= K) ? N'(img.vecs[a-1]) : N'({$urandom, $urandom});
    end
    @(negedge clk); a_we = 0;
    foreach (img.vecs[j]) begin
      query = N'(img.vecs[j]); #1;
      check(addr, j + 1, $sformatf("registered %0d", j + 1));
      check(hit, 1, "hit");
    end
    for (int i = 0; i < 4000; i++) begin
      vec_t v;
      if (i % 2) v = img.vecs[$urandom % K] ^ (vec_t'(1) << ($urandom % N));
      else       v = {$urandom, $urandom} & ((vec_t'(1) << N) - 1);
      query = N'(v); #1;
      check(addr, img.lookup(v), "unregistered");
      check(hit, img.lookup(v) != 0, "no hit");
      if (img.lookup(v) == 0 && tmp_addr != 0) rejected++;
    end
    $display("auxiliary-memory rejections: %0d", rejected);
    checks++;
    if (rejected == 0) begin
      failures++;
      $display("FAIL the coincidence check never rejected an address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
