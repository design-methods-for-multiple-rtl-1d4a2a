// tb_mvag_top: end-to-end test of the whole design at its default sizes.
//
//  * Dictionary: three disjoint lists of 500 random words (1..8 letters,
//    5-bit codes, blank = 0) are compiled into cascade images with random
//    don't-care entries, loaded with their auxiliary memories and
//    translations, then every word and 3000 unregistered words are looked
//    up. A look-up where a list's cascade gave a non-zero temporary address
//    that the coincidence check rejected is counted as a rejection.
//  * Memory patch: a 64K x 8 image with 15 patched words; all addresses
//    are read.
//  * Researcher database: the 22 sample researchers and 1000 other IDs.
//  * General function of weight 255 (48 inputs, 16 outputs): its 255
//    non-zero combinations and 1000 one-bit-off inputs.
//  * The two multi-level 48-input networks: loaded with the same 255
//    combinations as the general function; for every input tried there,
//    both must give the same index as that function's cascade (the index
//    from the vector list), and each registered combination must reach
//    every element of both networks.
//  * The three fixed example generators: all their inputs.
// Each mechanism (dictionary hit in each list, dictionary miss, rejection
// by the auxiliary memory, patched read, plain ROM read, rejection in the
// fixed 11-input generator) must happen at least once.
module tb_mvag_top;
  import cascade_prog_pkg::*;
  import researcher_table_pkg::*;
  import pq_net_pkg::*;
  localparam int unsigned L = 3, N = 40, A = 9, OW = 80, P = 11, WK = 500;
  localparam int unsigned S = 16;
  localparam int unsigned RAW = 16, RDW = 8, PW = 4, PP = 6, PK = 15, PS = 6;

  logic clk = 0;
  logic [39:0] dict_word = '0;
  logic dict_hit;
  logic [1:0] dict_list, dict_p_list = '0;
  logic [8:0] dict_addr;
  logic [79:0] dict_japanese;
  logic dict_c_we = 0, dict_a_we = 0, dict_r_we = 0;
  logic [3:0] dict_c_cell = '0;
  logic [10:0] dict_c_addr = '0;
  logic [8:0] dict_c_data = '0, dict_a_addr = '0, dict_r_addr = '0;
  logic [39:0] dict_a_data = '0;
  logic [79:0] dict_r_data = '0;
  logic [15:0] patch_rom_addr = '0, patch_m_addr = '0, patch_a_data = '0;
  logic [7:0] patch_data, patch_m_data = '0, patch_d_data = '0;
  logic patch_patched, patch_m_we = 0, patch_d_we = 0, patch_c_we = 0, patch_a_we = 0;
  logic [3:0] patch_d_addr = '0, patch_c_data = '0, patch_a_addr = '0;
  logic [2:0] patch_c_cell = '0;
  logic [5:0] patch_c_addr = '0;
  logic [10:0] ex71_x = '0;
  logic [3:0] ex71_f, ex71_z;
  logic [4:0] ex41_x = '0, ex43_x = '0;
  logic [2:0] ex41_f, ex41_y, ex43_f;
  logic ex43_y1;
  logic [29:0] rdb_id = '0, rdb_a_data = '0;
  logic rdb_found, rdb_c_we = 0, rdb_a_we = 0, rdb_r_we = 0;
  logic [12:0] rdb_number, rdb_c_data = '0, rdb_a_addr = '0, rdb_r_addr = '0;
  logic [449:0] rdb_record, rdb_r_data = '0;
  logic [3:0] rdb_c_cell = '0;
  logic [14:0] rdb_c_addr = '0;
  logic [47:0] wf_x = '0;
  logic [15:0] wf_f;
  logic [7:0] wf_index, wf_c_data = '0, wf_d_addr = '0, wf_d_data = '0;
  logic wf_c_we = 0, wf_d_we = 0, wf_d_sel = 0;
  logic [4:0] wf_c_cell = '0;
  logic [9:0] wf_c_addr = '0;
  cascade_image wimg;
  net_image n12img, n11img;
  logic [47:0] n12_x = '0, n11_x = '0;
  logic [7:0] n12_y, n11_y, n12_wdata = '0, n11_wdata = '0;
  logic n12_we = 0, n11_we = 0;
  logic [3:0] n12_wsel = '0, n11_wsel = '0;
  logic [11:0] n12_waddr = '0;
  logic [10:0] n11_waddr = '0;
  int n_net_hit = 0, n_net_zero = 0;
  logic [15:0] wout [256];
  int n_wf_nonzero = 0, n_wf_zero = 0;
  cascade_image rimg;
  logic [449:0] rrec [K+1];
  int n_rdb_hit = 0, n_rdb_reject = 0;

  int checks = 0, failures = 0;
  int n_hit [L];
  int n_miss = 0, n_reject = 0, n_patch = 0, n_rom = 0, n_ex71_reject = 0;
  cascade_image img [L];
  cascade_image pimg;
  logic [OW-1:0] jp [L][WK+1];
  logic [RDW-1:0] rom [2**RAW];
  logic [RDW-1:0] fix [PK+1];

  mvag_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [OW-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
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

  // temporary addresses of the three lists' cascades
  function automatic bit any_tmp();
    return (dut.u_dict.g_list[0].u_ag.tmp_addr != 0) ||
           (dut.u_dict.g_list[1].u_ag.tmp_addr != 0) ||
           (dut.u_dict.g_list[2].u_ag.tmp_addr != 0);
  endfunction

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---------------- dictionary ----------------
    for (int l = 0; l < L; l++) begin
      int unsigned dummy;
      img[l] = new(N, P, A);
      while (img[l].vecs.size() < WK) begin
        vec_t w;
        w = rand_word();
        if (find(w, dummy) == 0) img[l].add(w);
      end
      img[l].build(1'b1);
      jp[l][0] = '0;
      for (int a = 1; a <= WK; a++) jp[l][a] = {$urandom, $urandom, $urandom};
      n_hit[l] = 0;
    end
    for (int l = 0; l < L; l++) begin
      @(negedge clk); dict_p_list = 2'(l);
      for (int c = 0; c < S; c++)
        for (int e = 0; e < 2**P; e++) begin
          @(negedge clk);
          dict_c_we = 1; dict_c_cell = 4'(c); dict_c_addr = 11'(e);
          dict_c_data = 9'(img[l].tbl[c][e]);
        end
      @(negedge clk); dict_c_we = 0;
      for (int a = 0; a < 2**A; a++) begin
        @(negedge clk);
        dict_a_we = 1; dict_r_we = 1; dict_a_addr = 9'(a); dict_r_addr = 9'(a);
        dict_a_data = (a >= 1 && a <= WK) ? 40'(img[l].vecs[a-1]) : '0;
        dict_r_data = (a >= 1 && a <= WK) ? jp[l][a] : '0;
      end
      @(negedge clk); dict_a_we = 0; dict_r_we = 0;
    end
    for (int l = 0; l < L; l++)
      foreach (img[l].vecs[j]) begin
        dict_word = 40'(img[l].vecs[j]); #1;
        check(80'(dict_hit), 1, "dict hit");
        check(80'(dict_list), 80'(l), "dict list");
        check(80'(dict_addr), 80'(j + 1), "dict address");
        check(dict_japanese, jp[l][j + 1], "dict translation");
        if (dict_hit) n_hit[l]++;
      end
    for (int i = 0; i < 3000; i++) begin
      vec_t w;
      int unsigned lst, a;
      if (i % 2) begin
        w = img[$urandom % L].vecs[$urandom % WK];
        w = w ^ (vec_t'(1 + $urandom % 31) << (5 * ($urandom % 8)));
      end else w = rand_word();
      a = find(w, lst);
      dict_word = 40'(w); #1;
      check(80'(dict_hit), 80'(a != 0), "dict miss");
      check(80'(dict_addr), 80'(a), "dict miss address");
      check(dict_japanese, (a != 0) ? jp[lst][a] : '0, "dict miss translation");
      if (a == 0) begin
        n_miss++;
        if (any_tmp()) n_reject++;
      end
    end

    // ---------------- memory patch ----------------
    pimg = new(RAW, PP, PW);
    while (pimg.vecs.size() < PK) begin
      vec_t a;
      a = vec_t'($urandom % (2**RAW));
      if (pimg.lookup(a) == 0) pimg.add(a);
    end
    pimg.build(1'b1);
    for (int a = 0; a < 2**RAW; a++) begin
      rom[a] = 8'($urandom);
      @(negedge clk); patch_m_we = 1; patch_m_addr = 16'(a); patch_m_data = rom[a];
    end
    @(negedge clk); patch_m_we = 0;
    for (int c = 0; c < PS; c++)
      for (int e = 0; e < 2**PP; e++) begin
        @(negedge clk);
        patch_c_we = 1; patch_c_cell = 3'(c); patch_c_addr = 6'(e);
        patch_c_data = 4'(pimg.tbl[c][e]);
      end
    @(negedge clk); patch_c_we = 0;
    for (int i = 0; i <= PK; i++) begin
      fix[i] = (i == 0) ? '0 : ~rom[pimg.vecs[i-1]];
      @(negedge clk);
      patch_a_we = 1; patch_a_addr = 4'(i); patch_a_data = (i == 0) ? '0 : 16'(pimg.vecs[i-1]);
      patch_d_we = 1; patch_d_addr = 4'(i); patch_d_data = fix[i];
    end
    @(negedge clk); patch_a_we = 0; patch_d_we = 0;
    for (int a = 0; a < 2**RAW; a++) begin
      int unsigned k;
      k = pimg.lookup(vec_t'(a));
      patch_rom_addr = 16'(a); #1;
      check(80'(patch_data), 80'((k != 0) ? fix[k] : rom[a]), "patch data");
      check(80'(patch_patched), 80'(k != 0), "patch flag");
      if (patch_patched) n_patch++; else n_rom++;
    end

    // ---------------- researcher database ----------------
    rimg = new(30, 15, 13);
    rrec[0] = '0;
    for (int j = 0; j < K; j++) begin
      rimg.add(enc(TBL[j][0], 6));
      rrec[j+1] = '0;
      for (int f = 1; f <= 5; f++) rrec[j+1] = (rrec[j+1] << 90) | 450'(enc(TBL[j][f], 18));
    end
    rimg.build(1'b1);
    for (int c = 0; c < rimg.s; c++)
      for (int e = 0; e < 2**15; e++) begin
        @(negedge clk);
        rdb_c_we = 1; rdb_c_cell = 4'(c); rdb_c_addr = 15'(e); rdb_c_data = 13'(rimg.tbl[c][e]);
      end
    @(negedge clk); rdb_c_we = 0;
    for (int a = 0; a <= K; a++) begin
      @(negedge clk);
      rdb_a_we = 1; rdb_r_we = 1; rdb_a_addr = 13'(a); rdb_r_addr = 13'(a);
      rdb_a_data = (a == 0) ? '0 : 30'(rimg.vecs[a-1]);
      rdb_r_data = rrec[a];
    end
    @(negedge clk); rdb_a_we = 0; rdb_r_we = 0;
    for (int i = 0; i < 1000 + K; i++) begin
      vec_t v;
      int unsigned k;
      if (i < K) v = rimg.vecs[i];
      else if (i % 2) v = rimg.vecs[$urandom % K] ^ (vec_t'(1 + $urandom % 31) << (5 * ($urandom % 6)));
      else v = vec_t'($urandom) & ((vec_t'(1) << 30) - 1);
      k = rimg.lookup(v);
      rdb_id = 30'(v); #1;
      check(80'(rdb_found), 80'(k != 0), "rdb found");
      check(80'(rdb_number), 80'(k), "rdb number");
      checks++;
      if (rdb_record !== rrec[k]) begin
        failures++;
        $display("FAIL rdb record for number %0d", k);
      end
      if (k != 0) n_rdb_hit++;
      else if (dut.u_rdb.u_ag.tmp_addr != 0) n_rdb_reject++;
    end

    // ---------------- general function of weight 255 ----------------
    wimg = new(48, 10, 8);
    while (wimg.vecs.size() < 255) begin
      vec_t v;
      v = {$urandom, $urandom} & ((vec_t'(1) << 48) - 1);
      if (wimg.lookup(v) == 0) wimg.add(v);
    end
    wimg.build(1'b0);
    wout[0] = '0;
    for (int j = 1; j < 256; j++) wout[j] = 16'(1 + $urandom % 65535);
    for (int c = 0; c < wimg.s; c++)
      for (int e = 0; e < 1024; e++) begin
        @(negedge clk);
        wf_c_we = 1; wf_c_cell = 5'(c); wf_c_addr = 10'(e); wf_c_data = 8'(wimg.tbl[c][e]);
      end
    @(negedge clk); wf_c_we = 0;
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        wf_d_we = 1; wf_d_sel = e[0]; wf_d_addr = 8'(i); wf_d_data = wout[i][15-e*8 -: 8];
      end
    @(negedge clk); wf_d_we = 0;
    n12img = new(8);
    for (int e = 0; e < 10; e++) void'(n12img.add_element(12));
    n12img.src(0, -1, 47, 36); n12img.src(1, -1, 35, 24);
    n12img.src(2, -1, 23, 12); n12img.src(3, -1, 11, 0);
    n12img.src(4, 1, 7, 0);  n12img.src(4, 2, 7, 4);
    n12img.src(5, 2, 3, 0);  n12img.src(5, 3, 7, 0);
    n12img.src(6, 0, 7, 0);  n12img.src(6, 4, 7, 4);
    n12img.src(7, 4, 3, 0);  n12img.src(7, 5, 7, 0);
    n12img.src(8, 6, 3, 0);  n12img.src(8, 7, 7, 0);
    n12img.src(9, 6, 7, 4);  n12img.src(9, 8, 7, 0);
    n11img = new(8);
    for (int e = 0; e < 13; e++) void'(n11img.add_element(11));
    void'(n11img.add_element(9));
    n11img.src(0, -1, 47, 37); n11img.src(1, -1, 36, 26);
    n11img.src(2, -1, 25, 15); n11img.src(3, -1, 14, 4);
    n11img.src(4, 3, 6, 0);   n11img.src(4, -1, 3, 0);
    n11img.src(5, 0, 4, 0);   n11img.src(5, 1, 7, 2);
    n11img.src(6, 0, 7, 5);   n11img.src(6, 5, 7, 0);
    n11img.src(7, 1, 1, 0);   n11img.src(7, 2, 7, 0);  n11img.src(7, 3, 7, 7);
    n11img.src(8, 7, 7, 0);   n11img.src(8, 4, 7, 5);
    n11img.src(9, 8, 5, 0);   n11img.src(9, 4, 4, 0);
    n11img.src(10, 6, 7, 0);  n11img.src(10, 8, 7, 6); n11img.src(10, 9, 7, 7);
    n11img.src(11, 10, 3, 0); n11img.src(11, 9, 6, 0);
    n11img.src(12, 10, 7, 4); n11img.src(12, 11, 7, 1);
    n11img.src(13, 12, 7, 0); n11img.src(13, 11, 0, 0);
    foreach (wimg.vecs[j]) begin
      n12img.vecs.push_back(64'(wimg.vecs[j]));
      n11img.vecs.push_back(64'(wimg.vecs[j]));
    end
    n12img.build();
    n11img.build();
    check(80'(n12img.overflow + n11img.overflow), 0, "network code overflow");
    foreach (n12img.tbl[e])
      foreach (n12img.tbl[e][a]) begin
        @(negedge clk);
        n12_we = 1; n12_wsel = 4'(e); n12_waddr = 12'(a); n12_wdata = 8'(n12img.tbl[e][a]);
      end
    @(negedge clk); n12_we = 0;
    foreach (n11img.tbl[e])
      foreach (n11img.tbl[e][a]) begin
        @(negedge clk);
        n11_we = 1; n11_wsel = 4'(e); n11_waddr = 11'(a); n11_wdata = 8'(n11img.tbl[e][a]);
      end
    @(negedge clk); n11_we = 0;
    for (int i = 0; i < 255 + 1000; i++) begin
      vec_t v;
      if (i < 255) v = wimg.vecs[i];
      else v = wimg.vecs[$urandom % 255] ^ (vec_t'(1) << ($urandom % 48));
      wf_x = 48'(v); n12_x = 48'(v); n11_x = 48'(v); #1;
      check(80'(wf_f), 80'(wout[wimg.lookup(v)]), "weighted function");
      check(80'(n12_y), 80'(wimg.lookup(v)), "12-input network");
      check(80'(n11_y), 80'(wimg.lookup(v)), "11-input network");
      if (n12_y != 0 && n11_y != 0) n_net_hit++;
      if (n12_y == 0 && n11_y == 0) n_net_zero++;
      if (wf_f != 0) n_wf_nonzero++; else n_wf_zero++;
    end

    // ---------------- fixed example generators ----------------
    begin
      logic [10:0] reg71 [15];
      logic [4:0]  reg41 [7];
      reg71 = '{11'b00100101100, 11'b00111110101, 11'b00111110110, 11'b01001100101,
                11'b01001101111, 11'b10000100100, 11'b10001100101, 11'b10001101001,
                11'b10001101111, 11'b10100001001, 11'b10100100100, 11'b11000110101,
                11'b11001001111, 11'b11010000000, 11'b11010001001};
      reg41 = '{5'b00010, 5'b00101, 5'b01000, 5'b01100, 5'b01110, 5'b01111, 5'b11001};
      for (int v = 0; v < 2048; v++) begin
        int unsigned e;
        e = 0;
        for (int j = 0; j < 15; j++) if (reg71[j] == 11'(v)) e = j + 1;
        ex71_x = 11'(v); #1;
        check(80'(ex71_f), 80'(e), "ex71");
        if (e == 0 && ex71_z != 0) n_ex71_reject++;
      end
      for (int v = 0; v < 32; v++) begin
        int unsigned e;
        e = 0;
        for (int j = 0; j < 7; j++) if (reg41[j] == 5'(v)) e = j + 1;
        ex41_x = 5'(v); ex43_x = 5'(31 - v); #1;
        check(80'(ex41_f), 80'(e), "ex41");
        check(80'(ex43_f), 80'((31 - v < 8) ? 31 - v : 0), "ex43");
      end
    end

    $display("dictionary hits per list %0d %0d %0d, misses %0d, rejected by auxiliary memory %0d",
             n_hit[0], n_hit[1], n_hit[2], n_miss, n_reject);
    $display("patched reads %0d, ROM reads %0d, 11-input generator rejections %0d",
             n_patch, n_rom, n_ex71_reject);
    $display("researcher look-ups found %0d, rejected by auxiliary memory %0d", n_rdb_hit, n_rdb_reject);
    $display("weighted function non-zero outputs %0d, zero outputs %0d", n_wf_nonzero, n_wf_zero);
    for (int l = 0; l < L; l++) check(80'(n_hit[l] > 0), 1, "a list never hit");
    check(80'(n_wf_nonzero), 80'(255), "weighted function non-zero outputs");
    check(80'(n_wf_zero > 0), 1, "weighted function zero outputs");
    $display("multi-level networks: both found %0d, both rejected %0d", n_net_hit, n_net_zero);
    check(80'(n_net_hit), 80'(255), "network hits");
    check(80'(n_net_zero > 0), 1, "network rejections");
    check(80'(n_rdb_hit), 80'(K), "researcher hits");
    check(80'(n_rdb_reject > 0), 1, "no researcher rejection");
    check(80'(n_miss > 0), 1, "no dictionary miss");
    check(80'(n_reject > 0), 1, "no auxiliary-memory rejection");
    check(80'(n_patch), 80'(PK), "patched read count");
    check(80'(n_rom > 0), 1, "no ROM read");
    check(80'(n_ex71_reject > 0), 1, "no 11-input generator rejection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
