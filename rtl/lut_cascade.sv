// lut_cascade: a programmable LUT cascade of pq-elements.
//
// A function of N variables is reduced step by step by functional
// decomposition F(X1, X2) = G(H(X1), X2): each cell reads q "rail" bits from
// the cell before it plus r = p - q new primary inputs and produces q rails
// that encode which class of prefixes has been seen so far. The first cell
// reads p primary inputs only. After S = ceil((N - q) / r) cells every input
// has been consumed and the last cell's q outputs are the result. For an
// address generator with k registered vectors, q = ceil(log2(k + 1)) rails
// always suffice, because a decomposition chart of such a function has at
// most k + 1 distinct columns; r = 2 gives the smallest bound on total
// memory.
//
// Input order: x[N-1] is x1, the first variable, so the vector reads as the
// variables are written. Cell 0 takes x1..xp, cell i takes the next r. If
// p + (S - 1) r exceeds N, the missing last inputs are tied to 0. The cell
// address is {rails, new inputs}, rails in the upper bits.
//
// Interface: x (N) -> y (Q), combinational through S memory reads. Cells are
// written one word at a time through we / wcell / waddr / wdata on the rising
// edge of clk; contents are undefined until written (no reset). The default
// sizes (N = 48, P = 10, Q = 8, 20 cells, 160 kbit) are those of the
// 48-input, 255-vector cascade example. The write port, the asynchronous
// reads, the tie-off of padding inputs and the bit order are this design's
// choices.
module lut_cascade
  import mvag_pkg::*;
#(
  parameter int unsigned N = 48,
  parameter int unsigned P = 10,
  parameter int unsigned Q = 8,
  localparam int unsigned R      = P - Q,
  localparam int unsigned S      = cascade_cells(N, P, Q),
  localparam int unsigned CELL_W = sel_width(S)
) (
  input  logic              clk,
  input  logic [N-1:0]      x,
  output logic [Q-1:0]      y,
  // programming port
  input  logic              we,
  input  logic [CELL_W-1:0] wcell,
  input  logic [P-1:0]      waddr,
  input  logic [Q-1:0]      wdata
);

  localparam int unsigned W   = P + (S - 1) * R;   // inputs actually read
  localparam int unsigned PAD = W - N;

  initial begin
    assert (P > Q) else $error("lut_cascade: P must exceed Q");
    assert (W >= N) else $error("lut_cascade: cascade too short");
  end

  logic [W-1:0] xp;
  logic [Q-1:0] rail [S];

  if (PAD > 0) begin : g_pad
    assign xp = {x, {PAD{1'b0}}};
  end else begin : g_nopad
    assign xp = x;
  end

  for (genvar i = 0; i < S; i++) begin : g_cell
    logic [P-1:0] a;
    if (i == 0) begin : g_first
      assign a = xp[W-1 -: P];
    end else begin : g_next
      assign a = {rail[i-1], xp[W-1-P-(i-1)*R -: R]};
    end

    pq_element #(.P(P), .Q(Q)) u_cell (
      .clk  (clk),
      .we   (we && (wcell == CELL_W'(i))),
      .waddr(waddr),
      .wdata(wdata),
      .addr (a),
      .data (rail[i])
    );
  end

  assign y = rail[S-1];

endmodule
