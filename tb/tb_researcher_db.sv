// tb_researcher_db: loads the researcher database with a sample of 22
// researchers (number, six-letter ID, names, two research areas, location)
// and checks that each ID returns its number and record and that other IDs
// (random ones and registered ones with one letter changed) return nothing.
// Characters are coded blank = 0, a..z = 1..26, underscore = 27; upper
// case is folded to lower case. The address generator's cascade is loaded
// with random don't-care entries, so rejections by the auxiliary memory are
// counted and must occur.
module tb_researcher_db;
  import cascade_prog_pkg::*;
  import researcher_table_pkg::*;
  localparam int unsigned IDW = 30, NW = 13, FC = 18, CW5 = 5, P = 15;
  localparam int unsigned REC_W = 5 * FC * CW5, S = 9, CSW = 4;

  logic clk = 0;
  logic [IDW-1:0] id = '0;
  logic found;
  logic [NW-1:0] number;
  logic [REC_W-1:0] record;
  logic c_we = 0, a_we = 0, r_we = 0;
  logic [CSW-1:0] c_cell = '0;
  logic [P-1:0] c_addr = '0;
  logic [NW-1:0] c_data = '0, a_addr = '0, r_addr = '0;
  logic [IDW-1:0] a_data = '0;
  logic [REC_W-1:0] r_data = '0;
  int checks = 0, failures = 0, rejected = 0, misses = 0;
  cascade_image img;
  logic [REC_W-1:0] rec [K+1];

  researcher_db dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    img = new(IDW, P, NW);
    checks++;
    if (img.s != S) begin failures++; $display("FAIL cell count %0d", img.s); end
    rec[0] = '0;
    for (int j = 0; j < K; j++) begin
      img.add(enc(TBL[j][0], 6));
      rec[j+1] = '0;
      for (int f = 1; f <= 5; f++)
        rec[j+1] = (rec[j+1] << (FC * 5)) | REC_W'(enc(TBL[j][f], FC));
    end
    img.build(1'b1);
    for (int c = 0; c < S; c++)
      for (int e = 0; e < 2**P; e++) begin
        @(negedge clk);
        c_we = 1; c_cell = CSW'(c); c_addr = P'(e); c_data = NW'(img.tbl[c][e]);
      end
    @(negedge clk); c_we = 0;
    for (int a = 0; a <= K; a++) begin
      @(negedge clk);
      a_we = 1; r_we = 1; a_addr = NW'(a); r_addr = NW'(a);
      a_data = (a == 0) ? '0 : IDW'(img.vecs[a-1]);
      r_data = rec[a];
    end
    @(negedge clk); a_we = 0; r_we = 0;
    for (int j = 0; j < K; j++) begin
      id = IDW'(img.vecs[j]); #1;
      checks++;
      if (!found || number != NW'(j + 1) || record != rec[j+1]) begin
        failures++;
        $display("FAIL id %s: found %b number %0d", TBL[j][0], found, number);
      end
    end
    for (int i = 0; i < 4000; i++) begin
      vec_t v;
      int unsigned k;
      if (i % 2) v = img.vecs[$urandom % K] ^ (vec_t'(1 + $urandom % 31) << (5 * ($urandom % 6)));
      else       v = vec_t'($urandom) & ((vec_t'(1) << IDW) - 1);
      k = img.lookup(v);
      id = IDW'(v); #1;
      checks++;
      if (found != (k != 0) || number != NW'(k) || record != rec[k]) begin
        failures++;
        $display("FAIL id %h: found %b number %0d expected %0d", v, found, number, k);
      end
      if (k == 0) begin
        misses++;
        if (dut.u_ag.tmp_addr != 0) rejected++;
      end
    end
    $display("misses %0d, rejected by the auxiliary memory %0d", misses, rejected);
    checks++;
    if (rejected == 0) begin failures++; $display("FAIL no rejection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
