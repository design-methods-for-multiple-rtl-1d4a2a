// mvag_top: the address generators of this design side by side.
//
//  * dict_*  : the English-Japanese dictionary (ej_dictionary): three lists
//              of up to 500 forty-bit words, each an address generator with
//              an auxiliary memory feeding an 80-bit translation memory.
//  * patch_* : a firmware ROM with a patch memory selected by an address
//              generator (memory_patch).
//  * rdb_*   : the researcher database (researcher_db): 30-bit IDs of up to
//              8000 researchers to a 13-bit number and a record.
//  * wf_*    : a general 48-input 16-output function of weight up to 255,
//              address generator plus decoder (weighted_func).
//  * n12_*, n11_* : the same 48-input, 255-vector address generator as two
//              multi-level networks of pq-elements, with 12-input elements
//              (ex42_net_p12) and 11-input elements (ex42_net_p11).
//  * ex71_*  : the fixed 11-input, 15-vector generator with a three-cell
//              cascade, auxiliary memory and coincidence check.
//  * ex41_*, ex43_* : the two fixed 5-input, weight-7 generators made of
//              two memories each.
// The parts share only the clock used to load the programmable memories.
// Every port of a part is brought out under its prefix; the timing and
// loading rules are those of the parts (all lookups combinational, loads on
// the rising edge of clk, no reset).
module mvag_top
  import mvag_pkg::*;
(
  input  logic        clk,
  // dictionary
  input  logic [39:0] dict_word,
  output logic        dict_hit,
  output logic [1:0]  dict_list,
  output logic [8:0]  dict_addr,
  output logic [79:0] dict_japanese,
  input  logic [1:0]  dict_p_list,
  input  logic        dict_c_we,
  input  logic [3:0]  dict_c_cell,
  input  logic [10:0] dict_c_addr,
  input  logic [8:0]  dict_c_data,
  input  logic        dict_a_we,
  input  logic [8:0]  dict_a_addr,
  input  logic [39:0] dict_a_data,
  input  logic        dict_r_we,
  input  logic [8:0]  dict_r_addr,
  input  logic [79:0] dict_r_data,
  // memory patch
  input  logic [15:0] patch_rom_addr,
  output logic [7:0]  patch_data,
  output logic        patch_patched,
  input  logic        patch_m_we,
  input  logic [15:0] patch_m_addr,
  input  logic [7:0]  patch_m_data,
  input  logic        patch_d_we,
  input  logic [3:0]  patch_d_addr,
  input  logic [7:0]  patch_d_data,
  input  logic        patch_c_we,
  input  logic [2:0]  patch_c_cell,
  input  logic [5:0]  patch_c_addr,
  input  logic [3:0]  patch_c_data,
  input  logic        patch_a_we,
  input  logic [3:0]  patch_a_addr,
  input  logic [15:0] patch_a_data,
  // researcher database
  input  logic [29:0]  rdb_id,
  output logic         rdb_found,
  output logic [12:0]  rdb_number,
  output logic [449:0] rdb_record,
  input  logic         rdb_c_we,
  input  logic [3:0]   rdb_c_cell,
  input  logic [14:0]  rdb_c_addr,
  input  logic [12:0]  rdb_c_data,
  input  logic         rdb_a_we,
  input  logic [12:0]  rdb_a_addr,
  input  logic [29:0]  rdb_a_data,
  input  logic         rdb_r_we,
  input  logic [12:0]  rdb_r_addr,
  input  logic [449:0] rdb_r_data,
  // general function of weight k
  input  logic [47:0]  wf_x,
  output logic [15:0]  wf_f,
  output logic [7:0]   wf_index,
  input  logic         wf_c_we,
  input  logic [4:0]   wf_c_cell,
  input  logic [9:0]   wf_c_addr,
  input  logic [7:0]   wf_c_data,
  input  logic         wf_d_we,
  input  logic         wf_d_sel,
  input  logic [7:0]   wf_d_addr,
  input  logic [7:0]   wf_d_data,
  // 48-input multi-level networks
  input  logic [47:0] n12_x,
  output logic [7:0]  n12_y,
  input  logic        n12_we,
  input  logic [3:0]  n12_wsel,
  input  logic [11:0] n12_waddr,
  input  logic [7:0]  n12_wdata,
  input  logic [47:0] n11_x,
  output logic [7:0]  n11_y,
  input  logic        n11_we,
  input  logic [3:0]  n11_wsel,
  input  logic [10:0] n11_waddr,
  input  logic [7:0]  n11_wdata,
  // fixed example generators
  input  logic [10:0] ex71_x,
  output logic [3:0]  ex71_f,
  output logic [3:0]  ex71_z,
  input  logic [4:0]  ex41_x,
  output logic [2:0]  ex41_f,
  output logic [2:0]  ex41_y,
  input  logic [4:0]  ex43_x,
  output logic [2:0]  ex43_f,
  output logic        ex43_y1
);

  ej_dictionary u_dict (
    .clk     (clk),
    .word    (dict_word),
    .hit     (dict_hit),
    .list_idx(dict_list),
    .addr    (dict_addr),
    .japanese(dict_japanese),
    .p_list  (dict_p_list),
    .c_we    (dict_c_we),
    .c_cell  (dict_c_cell),
    .c_addr  (dict_c_addr),
    .c_data  (dict_c_data),
    .a_we    (dict_a_we),
    .a_addr  (dict_a_addr),
    .a_data  (dict_a_data),
    .r_we    (dict_r_we),
    .r_addr  (dict_r_addr),
    .r_data  (dict_r_data)
  );

  memory_patch u_patch (
    .clk     (clk),
    .rom_addr(patch_rom_addr),
    .data    (patch_data),
    .patched (patch_patched),
    .m_we    (patch_m_we),
    .m_addr  (patch_m_addr),
    .m_data  (patch_m_data),
    .d_we    (patch_d_we),
    .d_addr  (patch_d_addr),
    .d_data  (patch_d_data),
    .c_we    (patch_c_we),
    .c_cell  (patch_c_cell),
    .c_addr  (patch_c_addr),
    .c_data  (patch_c_data),
    .a_we    (patch_a_we),
    .a_addr  (patch_a_addr),
    .a_data  (patch_a_data)
  );

  researcher_db u_rdb (
    .clk   (clk),
    .id    (rdb_id),
    .found (rdb_found),
    .number(rdb_number),
    .record(rdb_record),
    .c_we  (rdb_c_we),
    .c_cell(rdb_c_cell),
    .c_addr(rdb_c_addr),
    .c_data(rdb_c_data),
    .a_we  (rdb_a_we),
    .a_addr(rdb_a_addr),
    .a_data(rdb_a_data),
    .r_we  (rdb_r_we),
    .r_addr(rdb_r_addr),
    .r_data(rdb_r_data)
  );

  weighted_func u_wf (
    .clk   (clk),
    .x     (wf_x),
    .f     (wf_f),
    .index (wf_index),
    .c_we  (wf_c_we),
    .c_cell(wf_c_cell),
    .c_addr(wf_c_addr),
    .c_data(wf_c_data),
    .d_we  (wf_d_we),
    .d_sel (wf_d_sel),
    .d_addr(wf_d_addr),
    .d_data(wf_d_data)
  );

  ex42_net_p12 u_n12 (
    .clk  (clk),
    .x    (n12_x),
    .y    (n12_y),
    .we   (n12_we),
    .wsel (n12_wsel),
    .waddr(n12_waddr),
    .wdata(n12_wdata)
  );

  ex42_net_p11 u_n11 (
    .clk  (clk),
    .x    (n11_x),
    .y    (n11_y),
    .we   (n11_we),
    .wsel (n11_wsel),
    .waddr(n11_waddr),
    .wdata(n11_wdata)
  );

  ex71_addr_gen u_ex71 (.x(ex71_x), .f(ex71_f), .z(ex71_z));
  ex41_addr_gen u_ex41 (.x(ex41_x), .f(ex41_f), .y(ex41_y));
  ex43_addr_gen u_ex43 (.x(ex43_x), .f(ex43_f), .y1(ex43_y1));

endmodule
