// memory_patch: firmware ROM with a patch memory selected by an address
// generator.
//
// After shipping, some words of a firmware ROM have to be replaced. The
// replaced ROM addresses are registered in an address generator, which maps
// each of them to a small index 1..k and every other address to 0. The
// index addresses the patch (auxiliary) memory that holds the new words. The
// generator's hit line enables the patch memory; through an inverter it
// enables the ROM otherwise, so exactly one of the two drives the output
// bus.
//
// Interface: rom_addr (ROM_AW) -> data (DATA_W) and patched, combinational.
// The shared output bus is modelled as a multiplexer steered by the two
// enables rather than with tri-state drivers. Loading on the rising edge of
// clk: ROM words (m_*), the patch memory (d_*), and the address generator's
// cascade (c_*) and auxiliary memory (a_*). No reset.
//
// The address generator is the auxiliary-memory kind (addr_gen_aux). The
// structure follows the patch circuit's block diagram; all widths (a 64K x 8
// ROM and up to 15 patched words) are this design's choices, as are the load
// ports and the multiplexer.
module memory_patch
  import mvag_pkg::*;
#(
  parameter int unsigned ROM_AW   = 16,
  parameter int unsigned DATA_W   = 8,
  parameter int unsigned PATCH_AW = 4,
  parameter int unsigned P        = PATCH_AW + 2,
  localparam int unsigned S       = cascade_cells(ROM_AW, P, PATCH_AW),
  localparam int unsigned CELL_W  = sel_width(S)
) (
  input  logic                clk,
  input  logic [ROM_AW-1:0]   rom_addr,
  output logic [DATA_W-1:0]   data,
  output logic                patched,
  // loading
  input  logic                m_we,
  input  logic [ROM_AW-1:0]   m_addr,
  input  logic [DATA_W-1:0]   m_data,
  input  logic                d_we,
  input  logic [PATCH_AW-1:0] d_addr,
  input  logic [DATA_W-1:0]   d_data,
  input  logic                c_we,
  input  logic [CELL_W-1:0]   c_cell,
  input  logic [P-1:0]        c_addr,
  input  logic [PATCH_AW-1:0] c_data,
  input  logic                a_we,
  input  logic [PATCH_AW-1:0] a_addr,
  input  logic [ROM_AW-1:0]   a_data
);

  logic [PATCH_AW-1:0] idx, tmp;
  logic                hit, patch_ce, rom_ce;
  logic [DATA_W-1:0]   patch_q, rom_q;

  addr_gen_aux #(.N_BITS(ROM_AW), .ADDR_W(PATCH_AW), .P(P)) u_ag (
    .clk     (clk),
    .query   (rom_addr),
    .addr    (idx),
    .hit     (hit),
    .tmp_addr(tmp),
    .c_we    (c_we),
    .c_cell  (c_cell),
    .c_addr  (c_addr),
    .c_data  (c_data),
    .a_we    (a_we),
    .a_addr  (a_addr),
    .a_data  (a_data)
  );

  assign patch_ce = hit;
  assign rom_ce   = ~hit;

  aux_memory #(.ADDR_W(PATCH_AW), .DATA_W(DATA_W)) u_patch (
    .clk  (clk),
    .we   (d_we),
    .waddr(d_addr),
    .wdata(d_data),
    .addr (idx),
    .data (patch_q)
  );

  pq_element #(.P(ROM_AW), .Q(DATA_W)) u_rom (
    .clk  (clk),
    .we   (m_we),
    .waddr(m_addr),
    .wdata(m_data),
    .addr (rom_addr),
    .data (rom_q)
  );

  always_comb begin
    data = '0;
    if (patch_ce) data = patch_q;
    if (rom_ce)   data = rom_q;
  end

  assign patched = hit;

  // The two enables are complementary: one memory drives the bus.
  always_comb assert (patch_ce ^ rom_ce);

endmodule
