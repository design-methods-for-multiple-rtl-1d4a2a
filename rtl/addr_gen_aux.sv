// addr_gen_aux: address generator simplified with an auxiliary memory.
//
// Idea: an exact address generator must give 0 for every one of the 2^n
// unregistered inputs, which forces many rails in its cascade. Here the
// cascade (the "network for G") only has to be right for the k registered
// vectors; for all other inputs its output is a don't care, so a much
// smaller cascade can be loaded. Its output is a temporary address. The
// auxiliary memory returns the registered vector stored at that address and
// the coincidence circuit compares it with the query: on a match the
// temporary address is the answer, otherwise the answer is 0.
//
// Interface: query (N_BITS, x1 in the MSB) -> addr (ADDR_W) and hit (addr != 0),
// combinational: cascade, then auxiliary memory, then comparator.
// Programming: cascade cells via c_we / c_cell / c_addr / c_data; auxiliary
// memory via a_we / a_addr / a_data (the vector of each address 1..k); both
// on the rising edge of clk; no reset. tmp_addr is brought out for
// observation.
//
// The cascade here is a uniform one with Q = ADDR_W rails, so any list of up
// to 2^ADDR_W - 1 vectors can be loaded; cascades with fewer or uneven
// rails, which don't cares often allow, are not modelled. Default sizes are
// one dictionary list: 40-bit words, 9-bit addresses, 11-input cells
// (p - q = 2).
module addr_gen_aux
  import mvag_pkg::*;
#(
  parameter int unsigned N_BITS = DICT_WORD_W,
  parameter int unsigned ADDR_W = DICT_ADDR_W,
  parameter int unsigned P      = DICT_ADDR_W + 2,
  localparam int unsigned S      = cascade_cells(N_BITS, P, ADDR_W),
  localparam int unsigned CELL_W = sel_width(S)
) (
  input  logic              clk,
  input  logic [N_BITS-1:0] query,
  output logic [ADDR_W-1:0] addr,
  output logic              hit,
  output logic [ADDR_W-1:0] tmp_addr,
  // cascade programming
  input  logic              c_we,
  input  logic [CELL_W-1:0] c_cell,
  input  logic [P-1:0]      c_addr,
  input  logic [ADDR_W-1:0] c_data,
  // auxiliary memory programming
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [N_BITS-1:0] a_data
);

  logic [N_BITS-1:0] reg_data;
  logic              match;

  lut_cascade #(.N(N_BITS), .P(P), .Q(ADDR_W)) u_net2 (
    .clk  (clk),
    .x    (query),
    .y    (tmp_addr),
    .we   (c_we),
    .wcell(c_cell),
    .waddr(c_addr),
    .wdata(c_data)
  );

  aux_memory #(.ADDR_W(ADDR_W), .DATA_W(N_BITS)) u_aux (
    .clk  (clk),
    .we   (a_we),
    .waddr(a_addr),
    .wdata(a_data),
    .addr (tmp_addr),
    .data (reg_data)
  );

  coincidence_gate #(.N_BITS(N_BITS), .ADDR_W(ADDR_W)) u_coin (
    .query   (query),
    .reg_data(reg_data),
    .tmp_addr(tmp_addr),
    .match   (match),
    .addr    (addr)
  );

  // A match on address 0 is no hit: 0 is the "not registered" answer.
  assign hit = match && (tmp_addr != '0);

endmodule
