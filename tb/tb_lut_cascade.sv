// tb_lut_cascade: programs the default cascade (48 inputs, 10-input
// 8-output cells, 20 cells) as an exact address generator for 255 random
// registered vectors, many of which share long prefixes so that the rails
// have to keep them apart, and checks:
//  * every registered vector yields its address 1..255;
//  * random and near-miss (one bit flipped) unregistered vectors yield 0;
//  * the cell count equals ceil((n - q) / (p - q)) = 20.
module tb_lut_cascade;
  import cascade_prog_pkg::*;
  localparam int unsigned N = 48, P = 10, Q = 8, K = 255;
  localparam int unsigned S = 20;
  localparam int unsigned CW = 5;

  logic clk = 0, we = 0;
  logic [N-1:0] x = '0;
  logic [Q-1:0] y;
  logic [CW-1:0] wcell = '0;
  logic [P-1:0] waddr = '0;
  logic [Q-1:0] wdata = '0;
  int checks = 0, failures = 0;
  cascade_image img;

  lut_cascade dut (.*);

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
        keep = 2 + $urandom % (N - 4);              // shared prefix length
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
    img = new(N, P, Q);
    check(img.s, S, "cell count");
    for (int j = 0; j < K; j++) img.add(new_vec(img));
    img.build(1'b0);
    for (int c = 0; c < S; c++)
      for (int e = 0; e < 2**P; e++) begin
        @(negedge clk);
        we = 1; wcell = CW'(c); waddr = P'(e); wdata = Q'(img.tbl[c][e]);
      end
    @(negedge clk); we = 0;
    foreach (img.vecs[j]) begin
      x = N'(img.vecs[j]); #1;
      check(y, j + 1, $sformatf("registered %0d", j + 1));
    end
    for (int i = 0; i < 2000; i++) begin
      vec_t v;
      if (i % 2) v = img.vecs[$urandom % K] ^ (vec_t'(1) << ($urandom % N));
      else       v = {$urandom, $urandom} & ((vec_t'(1) << N) - 1);
      x = N'(v); #1;
      check(y, img.lookup(v), "unregistered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
