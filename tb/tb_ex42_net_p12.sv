// tb_ex42_net_p12: checks the 48-input multi-level address generator with
// ten 12-input elements in five levels, 320 kbit.
//
// The testbench describes the same network (which bits of which source feed
// each element) to a table builder, registers 255 random 48-bit vectors, a
// third of them sharing long prefixes with earlier ones, and writes the
// computed contents through the write port. It then checks that every
// registered vector gives its address 1..255 and that 4000 random vectors and
// 4000 vectors one bit away from a registered one give the address found by
// searching the vector list (0 for all of them unless a random vector happens
// to be registered). It also checks the element count, the total memory and
// that no element needed more than 255 codes. The vector list, not the
// network, is the reference.
module tb_ex42_net_p12;
  import pq_net_pkg::*;
  localparam int unsigned K = 255;

  logic clk = 0;
  logic [47:0] x = '0;
  logic [7:0] y;
  logic we = 0;
  logic [3:0] wsel = '0;
  logic [11:0] waddr = '0;
  logic [7:0] wdata = '0;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;
  int unsigned where [logic [47:0]];
  net_image net;

  ex42_net_p12 dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int unsigned got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int unsigned ref_addr(logic [47:0] v);
    return where.exists(v) ? where[v] : 0;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    net = new(8);
    for (int e = 0; e < 10; e++) void'(net.add_element(12));
    net.src(0, -1, 47, 36);
    net.src(1, -1, 35, 24);
    net.src(2, -1, 23, 12);
    net.src(3, -1, 11, 0);
    net.src(4, 1, 7, 0);  net.src(4, 2, 7, 4);
    net.src(5, 2, 3, 0);  net.src(5, 3, 7, 0);
    net.src(6, 0, 7, 0);  net.src(6, 4, 7, 4);
    net.src(7, 4, 3, 0);  net.src(7, 5, 7, 0);
    net.src(8, 6, 3, 0);  net.src(8, 7, 7, 0);
    net.src(9, 6, 7, 4);  net.src(9, 8, 7, 0);
    while (net.vecs.size() < K) begin
      logic [47:0] v, m;
      v = {$urandom, $urandom} & 48'hFFFF_FFFF_FFFF;
      if (net.vecs.size() > 0 && ($urandom % 3) == 0) begin
        m = 48'hFFFF_FFFF_FFFF << (4 + $urandom % 40);
        v = (48'(net.vecs[$urandom % net.vecs.size()]) & m) | (v & ~m);
      end
      if (!where.exists(v)) begin
        net.vecs.push_back(64'(v));
        where[v] = net.vecs.size();
      end
    end
    net.build();
    check(net.n_el, 10, "element count");
    check(net.mem_bits(), 320 * 1024, "memory bits");
    check(net.overflow, 0, "code overflow");
    foreach (net.tbl[e])
      foreach (net.tbl[e][a]) begin
        @(negedge clk);
        we = 1; wsel = 4'(e); waddr = 12'(a); wdata = 8'(net.tbl[e][a]);
      end
    @(negedge clk); we = 0;
    foreach (net.vecs[j]) begin
      x = 48'(net.vecs[j]); #1;
      check(y, j + 1, "registered vector");
      n_hit++;
    end
    for (int i = 0; i < 8000; i++) begin
      logic [47:0] v;
      if (i % 2) v = 48'(net.vecs[$urandom % K]) ^ (48'(1) << ($urandom % 48));
      else       v = {$urandom, $urandom} & 48'hFFFF_FFFF_FFFF;
      x = v; #1;
      check(y, ref_addr(v), "other vector");
      if (ref_addr(v) == 0) n_miss++;
    end
    $display("%0d registered vectors found, %0d others rejected (longest path 5 elements)", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
