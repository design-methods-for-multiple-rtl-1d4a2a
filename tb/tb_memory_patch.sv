// tb_memory_patch: loads a 64K x 8 firmware image, chooses 15 random ROM
// addresses to patch, loads the address generator (cascade with random
// don't-care entries, auxiliary memory with the patched addresses) and the
// patch memory with new words, then reads all 65536 addresses. Each read
// must return the patch word for a patched address and the ROM word for
// any other; the patched flag must be set exactly 15 times.
module tb_memory_patch;
  import cascade_prog_pkg::*;
  localparam int unsigned AW = 16, DW = 8, PW = 4, P = 6, K = 15;
  localparam int unsigned S = 6, CW = 3;

  logic clk = 0;
  logic [AW-1:0] rom_addr = '0;
  logic [DW-1:0] data;
  logic patched;
  logic m_we = 0, d_we = 0, c_we = 0, a_we = 0;
  logic [AW-1:0] m_addr = '0, a_data = '0;
  logic [DW-1:0] m_data = '0, d_data = '0;
  logic [PW-1:0] d_addr = '0, c_data = '0, a_addr = '0;
  logic [CW-1:0] c_cell = '0;
  logic [P-1:0] c_addr = '0;
  int checks = 0, failures = 0, n_patched = 0;
  logic [DW-1:0] rom [2**AW];
  logic [DW-1:0] fix [K+1];
  cascade_image img;

  memory_patch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    img = new(AW, P, PW);
    checks++;
    if (img.s != S) begin failures++; $display("FAIL cell count %0d", img.s); end
    while (img.vecs.size() < K) begin
      vec_t a;
      a = vec_t'($urandom % (2**AW));
      if (img.lookup(a) == 0) img.add(a);
    end
    img.build(1'b1);
    for (int a = 0; a < 2**AW; a++) begin
      rom[a] = DW'($urandom);
      @(negedge clk); m_we = 1; m_addr = AW'(a); m_data = rom[a];
    end
    @(negedge clk); m_we = 0;
    for (int c = 0; c < S; c++)
      for (int e = 0; e < 2**P; e++) begin
        @(negedge clk);
        c_we = 1; c_cell = CW'(c); c_addr = P'(e); c_data = PW'(img.tbl[c][e]);
      end
    @(negedge clk); c_we = 0;
    for (int i = 0; i < 2**PW; i++) begin
      fix[i % (K + 1)] = (i == 0) ? '0 : ~rom[img.vecs[(i - 1) % K]];
      @(negedge clk);
      a_we = 1; a_addr = PW'(i); a_data = (i == 0) ? '0 : AW'(img.vecs[i-1]);
      d_we = 1; d_addr = PW'(i); d_data = fix[i % (K + 1)];
    end
    @(negedge clk); a_we = 0; d_we = 0;
    for (int a = 0; a < 2**AW; a++) begin
      int unsigned k;
      k = img.lookup(vec_t'(a));
      rom_addr = AW'(a); #1;
      checks++;
      if (data !== ((k != 0) ? fix[k] : rom[a]) || patched !== (k != 0)) begin
        failures++;
        $display("FAIL addr %h: data %h patched %b (k=%0d)", a, data, patched, k);
      end
      if (patched) n_patched++;
    end
    checks++;
    if (n_patched != K) begin
      failures++;
      $display("FAIL %0d patched reads, expected %0d", n_patched, K);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
