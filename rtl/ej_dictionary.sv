// ej_dictionary: English-Japanese word dictionary built from address
// generators and memories.
//
// A word is kept as its first 8 letters, blank-padded, 5 bits per letter:
// a 40-bit query. The vocabulary (up to 1500 words) is split into three
// lists of at most 500 words. Each list has its own address generator with
// an auxiliary memory (addr_gen_aux), which turns a registered word into an
// address 1..500 and any other word into 0, and its own translation memory,
// which turns that address into an 80-bit Japanese word. The lists hold
// disjoint words, so at most one list hits; if more than one did, the list
// with the lowest index would win.
//
// Interface: word (40) -> hit, list_idx, addr (9), japanese (80), all
// combinational. Loading, on the rising edge of clk: p_list selects the list;
// c_* write a cascade cell word, a_* an auxiliary memory word, r_* a
// translation word. Nothing is reset: the memories must be loaded before
// use. Word length, letter code width, list count and size, and the 80-bit
// output follow the dictionary's description. How the three lists are
// combined, the uniform 9-rail cascades with 11-input cells, and the load
// ports are this design's choices.
module ej_dictionary
  import mvag_pkg::*;
#(
  parameter int unsigned N_LISTS = DICT_LISTS,
  parameter int unsigned N_BITS  = DICT_WORD_W,
  parameter int unsigned ADDR_W  = DICT_ADDR_W,
  parameter int unsigned OUT_W   = DICT_JP_W,
  parameter int unsigned P       = DICT_ADDR_W + 2,
  localparam int unsigned S      = cascade_cells(N_BITS, P, ADDR_W),
  localparam int unsigned CELL_W = sel_width(S),
  localparam int unsigned LIST_W = sel_width(N_LISTS)
) (
  input  logic              clk,
  input  logic [N_BITS-1:0] word,
  output logic              hit,
  output logic [LIST_W-1:0] list_idx,
  output logic [ADDR_W-1:0] addr,
  output logic [OUT_W-1:0]  japanese,
  // loading
  input  logic [LIST_W-1:0] p_list,
  input  logic              c_we,
  input  logic [CELL_W-1:0] c_cell,
  input  logic [P-1:0]      c_addr,
  input  logic [ADDR_W-1:0] c_data,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [N_BITS-1:0] a_data,
  input  logic              r_we,
  input  logic [ADDR_W-1:0] r_addr,
  input  logic [OUT_W-1:0]  r_data
);

  initial begin
    assert (2**ADDR_W - 1 >= DICT_WORDS || ADDR_W != DICT_ADDR_W)
      else $error("ej_dictionary: address width too small for a word list");
  end

  logic [ADDR_W-1:0] l_addr [N_LISTS];
  logic              l_hit  [N_LISTS];
  logic [OUT_W-1:0]  l_jp   [N_LISTS];

  for (genvar l = 0; l < N_LISTS; l++) begin : g_list
    logic [ADDR_W-1:0] tmp;
    logic              sel;
    assign sel = (p_list == LIST_W'(l));

    addr_gen_aux #(.N_BITS(N_BITS), .ADDR_W(ADDR_W), .P(P)) u_ag (
      .clk     (clk),
      .query   (word),
      .addr    (l_addr[l]),
      .hit     (l_hit[l]),
      .tmp_addr(tmp),
      .c_we    (c_we && sel),
      .c_cell  (c_cell),
      .c_addr  (c_addr),
      .c_data  (c_data),
      .a_we    (a_we && sel),
      .a_addr  (a_addr),
      .a_data  (a_data)
    );

    translation_rom #(.ADDR_W(ADDR_W), .DATA_W(OUT_W)) u_rom (
      .clk  (clk),
      .we   (r_we && sel),
      .waddr(r_addr),
      .wdata(r_data),
      .addr (l_addr[l]),
      .data (l_jp[l])
    );
  end

  always_comb begin
    hit      = 1'b0;
    list_idx = '0;
    addr     = '0;
    japanese = '0;
    for (int l = N_LISTS - 1; l >= 0; l--) begin
      if (l_hit[l]) begin
        hit      = 1'b1;
        list_idx = LIST_W'(l);
        addr     = l_addr[l];
        japanese = l_jp[l];
      end
    end
  end

endmodule
