// tb_ip_address_table: a router's address table as an address generator:
// up to 40000 IPv4 addresses (32 inputs) mapped to 16-bit indexes of a
// details memory. Uses addr_gen_aux with 32-bit queries, 16-bit addresses
// and 18-input cells (8 cells, 8 x 2^18 x 16 bits of cascade, 2^16 x 32 bits
// of auxiliary memory).
//
// 40000 addresses are drawn so that many share subnet prefixes, loaded, and
// checked: all 40000 hit with their index, 20000 random and one-bit-off
// addresses miss. Then the table is updated as a router would: 200 entries
// are replaced by new addresses, the cascade image is recompiled, and only
// the cell and auxiliary words that changed are rewritten; all entries are
// checked again, and the old addresses must now miss.
module tb_ip_address_table;
  import cascade_prog_pkg::*;
  localparam int unsigned N = 32, A = 16, P = 18, K = 40000, NUPD = 200;
  localparam int unsigned S = 8, CW = 3;

  logic clk = 0;
  logic [N-1:0] query = '0;
  logic [A-1:0] addr, tmp_addr;
  logic hit;
  logic c_we = 0, a_we = 0;
  logic [CW-1:0] c_cell = '0;
  logic [P-1:0] c_addr = '0;
  logic [A-1:0] c_data = '0, a_addr = '0;
  logic [N-1:0] a_data = '0;
  int checks = 0, failures = 0, rewritten = 0;
  cascade_image img, img2;
  vec_t old_v [NUPD];

  addr_gen_aux #(.N_BITS(N), .ADDR_W(A), .P(P)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int unsigned got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic vec_t new_ip(cascade_image im);
    vec_t v, m;
    int unsigned keep;
    forever begin
      v = vec_t'($urandom);
      if (im.vecs.size() > 0 && ($urandom % 2) != 0) begin
        keep = 8 + 8 * ($urandom % 3);              // /8, /16 or /24 subnet
        m = ((vec_t'(1) << keep) - 1) << (N - keep);
        v = (im.vecs[$urandom % im.vecs.size()] & m) | (v & ~m);
      end
      if (im.lookup(v) == 0) return v;
    end
  endfunction

  task automatic load_all(cascade_image im);
    for (int c = 0; c < S; c++)
      for (int e = 0; e < 2**P; e++) begin
        @(negedge clk);
        c_we = 1; c_cell = CW'(c); c_addr = P'(e); c_data = A'(im.tbl[c][e]);
      end
    @(negedge clk); c_we = 0;
    for (int a = 0; a < 2**A; a++) begin
      @(negedge clk);
      a_we = 1; a_addr = A'(a);
      a_data = (a >= 1 && a <= im.vecs.size()) ? N'(im.vecs[a-1]) : '0;
    end
    @(negedge clk); a_we = 0;
  endtask

  task automatic check_all(cascade_image im);
    foreach (im.vecs[j]) begin
      query = N'(im.vecs[j]); #1;
      check(addr, j + 1, "registered");
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    img = new(N, P, A);
    check(img.s, S, "cell count");
    for (int j = 0; j < K; j++) img.add(new_ip(img));
    img.build(1'b0);
    load_all(img);
    check_all(img);
    for (int i = 0; i < 20000; i++) begin
      vec_t v;
      if (i % 2) v = img.vecs[$urandom % K] ^ (vec_t'(1) << ($urandom % N));
      else       v = vec_t'($urandom);
      query = N'(v); #1;
      check(addr, img.lookup(v), "other address");
      check(hit, img.lookup(v) != 0, "hit flag");
    end
    // update: replace NUPD entries, rewrite only changed words
    img2 = new(N, P, A);
    foreach (img.vecs[j]) img2.add(img.vecs[j]);
    for (int u = 0; u < NUPD; u++) begin
      int unsigned j;
      vec_t v;
      j = (u * 197) % K;
      old_v[u] = img2.vecs[j];
      v = new_ip(img2);
      img2.index.delete(old_v[u]);
      img2.vecs[j] = v;
      img2.index[v] = j + 1;
    end
    img2.build(1'b0);
    for (int c = 0; c < S; c++)
      for (int e = 0; e < 2**P; e++)
        if (img2.tbl[c][e] != img.tbl[c][e]) begin
          @(negedge clk);
          c_we = 1; c_cell = CW'(c); c_addr = P'(e); c_data = A'(img2.tbl[c][e]);
          rewritten++;
        end
    @(negedge clk); c_we = 0;
    foreach (img2.vecs[j])
      if (img2.vecs[j] != img.vecs[j]) begin
        @(negedge clk);
        a_we = 1; a_addr = A'(j + 1); a_data = N'(img2.vecs[j]);
        rewritten++;
      end
    @(negedge clk); a_we = 0;
    $display("update of %0d entries rewrote %0d memory words", NUPD, rewritten);
    check_all(img2);
    for (int u = 0; u < NUPD; u++) begin
      query = N'(old_v[u]); #1;
      check(addr, img2.lookup(old_v[u]), "removed address");
    end
    checks++;
    if (rewritten == 0) begin failures++; $display("FAIL update wrote nothing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
