// weighted_func: an arbitrary n-input u-output logic function of weight k
// (non-zero for at most k input combinations) built from pq-elements.
//
// The function is split into an address generator and a decoder. The
// generator (an exact LUT cascade, ceil((n - q)/(p - q)) cells) gives each
// of the k input combinations with a non-zero output its own index 1..k and
// every other combination index 0, with q = ceil(log2(k + 1)). The decoder
// turns the q-bit index into the u output bits; it is ceil(u / q)
// q-input q-output elements side by side, each producing q of the outputs
// (the last one's surplus outputs are unused). Decoder word 0 must hold
// zero so that unregistered inputs give an all-zero output. Total elements:
// ceil((n - q)/(p - q)) + ceil(u / q).
//
// Interface: x (N, x1 in the MSB) -> f (U, f1 in the MSB) and the index,
// combinational through the cascade and one decoder read. Loading on the
// rising edge of clk: cascade cells via c_*; decoder elements via d_we /
// d_sel (element) / d_addr (index) / d_data (Q output bits; element e
// drives f bits U-1-e*Q downward). No reset.
//
// The generator-plus-decoder structure and its element count follow the
// published construction; the default sizes (48 inputs, weight up to 255,
// 10-input cells) reuse the 48-input cascade example, and the output width
// U = 16 and the load ports are this design's choices.
module weighted_func
  import mvag_pkg::*;
#(
  parameter int unsigned N = 48,
  parameter int unsigned P = 10,
  parameter int unsigned Q = 8,
  parameter int unsigned U = 16,
  localparam int unsigned S      = cascade_cells(N, P, Q),
  localparam int unsigned CELL_W = sel_width(S),
  localparam int unsigned D      = (U + Q - 1) / Q,
  localparam int unsigned DSEL_W = sel_width(D)
) (
  input  logic              clk,
  input  logic [N-1:0]      x,
  output logic [U-1:0]      f,
  output logic [Q-1:0]      index,
  // cascade loading
  input  logic              c_we,
  input  logic [CELL_W-1:0] c_cell,
  input  logic [P-1:0]      c_addr,
  input  logic [Q-1:0]      c_data,
  // decoder loading
  input  logic              d_we,
  input  logic [DSEL_W-1:0] d_sel,
  input  logic [Q-1:0]      d_addr,
  input  logic [Q-1:0]      d_data
);

  logic [D*Q-1:0] dec;

  lut_cascade #(.N(N), .P(P), .Q(Q)) u_gen (
    .clk  (clk),
    .x    (x),
    .y    (index),
    .we   (c_we),
    .wcell(c_cell),
    .waddr(c_addr),
    .wdata(c_data)
  );

  for (genvar e = 0; e < D; e++) begin : g_dec
    pq_element #(.P(Q), .Q(Q)) u_dec (
      .clk  (clk),
      .we   (d_we && (d_sel == DSEL_W'(e))),
      .waddr(d_addr),
      .wdata(d_data),
      .addr (index),
      .data (dec[D*Q-1-e*Q -: Q])
    );
  end

  assign f = dec[D*Q-1 -: U];

endmodule
