// tb_ej_dictionary: loads the default dictionary (three lists of 500
// 40-bit words, 9-bit addresses, 80-bit translations) and looks words up.
// Words are 1 to 8 random letters (codes 1..27: 26 letters and the
// underscore), padded with the blank code 0; the three lists are
// disjoint. Each list's cascade is loaded with don't-care entries filled at
// random and its auxiliary memory with the list's words. Checks:
//  * every registered word hits in its own list with its own address and
//    translation;
//  * unregistered words (random, and registered words with one letter
//    changed) miss, with address 0 and an all-zero translation;
//  * each list produced at least one hit.
module tb_ej_dictionary;
  import cascade_prog_pkg::*;
  localparam int unsigned L = 3, N = 40, A = 9, OW = 80, P = 11, K = 500;
  localparam int unsigned S = 16, CW = 4, LW = 2;

  logic clk = 0;
  logic [N-1:0] word = '0;
  logic hit;
  logic [LW-1:0] list_idx, p_list = '0;
  logic [A-1:0] addr;
  logic [OW-1:0] japanese;
  logic c_we = 0, a_we = 0, r_we = 0;
  logic [CW-1:0] c_cell = '0;
  logic [P-1:0] c_addr = '0;
  logic [A-1:0] c_data = '0, a_addr = '0, r_addr = '0;
  logic [N-1:0] a_data = '0;
  logic [OW-1:0] r_data = '0;
  int checks = 0, failures = 0;
  int list_hits [L];
  cascade_image img [L];
  logic [OW-1:0] jp [L][K+1];

  ej_dictionary dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [OW-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic vec_t rand_word();
    vec_t w;
    int unsigned len;
    len = 1 + $urandom % 8;
    w = '0;
    for (int i = 0; i < 8; i++)
      w = (w << 5) | ((i < len) ? vec_t'(1 + $urandom % 27) : vec_t'(0));
    return w;
  endfunction

  function automatic int unsigned find(vec_t w, output int unsigned lst);
    for (int l = 0; l < L; l++)
      if (img[l] != null && img[l].lookup(w) != 0) begin
        lst = l;
        return img[l].lookup(w);
      end
    lst = 0;
    return 0;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < L; l++) begin
      int unsigned dummy;
      img[l] = new(N, P, A);
      while (img[l].vecs.size() < K) begin
        vec_t w;
        w = rand_word();
        if (find(w, dummy) == 0) img[l].add(w);
      end
      img[l].build(1'b1);
      jp[l][0] = '0;
      for (int a = 1; a <= K; a++) jp[l][a] = {$urandom, $urandom, $urandom};
    end
    for (int l = 0; l < L; l++) begin
      @(negedge clk); p_list = LW'(l);
      for (int c = 0; c < S; c++)
        for (int e = 0; e < 2**P; e++) begin
          @(negedge clk);
          c_we = 1; c_cell = CW'(c); c_addr = P'(e); c_data = A'(img[l].tbl[c][e]);
        end
      @(negedge clk); c_we = 0;
      for (int a = 0; a < 2**A; a++) begin
        @(negedge clk);
        a_we = 1; r_we = 1; a_addr = A'(a); r_addr = A'(a);
        a_data = (a >= 1 && a <= K) ? N'(img[l].vecs[a-1]) : '0;
        r_data = (a >= 1 && a <= K) ? jp[l][a] : '0;
      end
      @(negedge clk); a_we = 0; r_we = 0;
    end
    for (int l = 0; l < L; l++) begin
      list_hits[l] = 0;
      foreach (img[l].vecs[j]) begin
        word = N'(img[l].vecs[j]); #1;
        check(OW'(hit), 1, "hit");
        check(OW'(list_idx), OW'(l), "list");
        check(OW'(addr), OW'(j + 1), "address");
        check(japanese, jp[l][j + 1], "translation");
        if (hit && list_idx == LW'(l)) list_hits[l]++;
      end
    end
    for (int i = 0; i < 3000; i++) begin
      vec_t w;
      int unsigned lst, a;
      if (i % 2) begin
        w = img[$urandom % L].vecs[$urandom % K];
        w = w ^ (vec_t'(1 + $urandom % 31) << (5 * ($urandom % 8)));
      end else w = rand_word();
      a = find(w, lst);
      word = N'(w); #1;
      check(OW'(hit), OW'(a != 0), "miss");
      check(OW'(addr), OW'(a), "miss address");
      check(japanese, (a != 0) ? jp[lst][a] : '0, "miss translation");
    end
    for (int l = 0; l < L; l++) begin
      checks++;
      if (list_hits[l] == 0) begin
        failures++;
        $display("FAIL list %0d never hit", l);
      end
    end
    $display("hits per list: %0d %0d %0d", list_hits[0], list_hits[1], list_hits[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
