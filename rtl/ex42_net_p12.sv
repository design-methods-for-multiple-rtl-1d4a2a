// ex42_net_p12: a 48-input, 8-output address generator built as a
// five-level tree of ten 12-input 8-output pq-elements (10 x 2^12 x 8 =
// 320 kbit), the p = 12 alternative to the 20-cell LUT cascade for up to
// 255 registered vectors.
//
// Each element is one step of functional decomposition: it reads up to 12
// bits (primary inputs or the codes of earlier elements) and writes an 8-bit
// code naming which class of its inputs has been seen. Some elements send
// their code to two successors, four bits to each. Structure (element:
// inputs -> outputs), x[47] being x1:
//   e0: x[47:36]            -> 8 to e6
//   e1: x[35:24]            -> 8 to e4
//   e2: x[23:12]            -> [7:4] to e4, [3:0] to e5
//   e3: x[11:0]             -> 8 to e5
//   e4: {e1, e2[7:4]}       -> [7:4] to e6, [3:0] to e7
//   e5: {e2[3:0], e3}       -> 8 to e7
//   e6: {e0, e4[7:4]}       -> [7:4] to e9, [3:0] to e8
//   e7: {e4[3:0], e5}       -> 8 to e8
//   e8: {e6[3:0], e7}       -> 8 to e9
//   e9: {e6[7:4], e8}       -> y
// The longest path, e2-e4-e7-e8-e9, has five elements. The element count,
// the 12/8/4-bit connection widths and the levels are those of the published
// network; which primary inputs feed which element, which half of a split
// code goes where, the order of the bits in an element's address (first
// listed source in the upper bits) and the write port are this design's
// choices.
//
// Interface: x (48) -> y (8), combinational through at most five memory
// reads. Element e is written on the rising edge of clk when we is high:
// wsel = e, waddr = element address, wdata = code. No reset; contents are
// undefined until written. Any set of up to 255 vectors can be loaded by
// giving every input combination an element sees for a registered vector its
// own non-zero code, all others code 0, and the last element the address.
module ex42_net_p12 (
  input  logic        clk,
  input  logic [47:0] x,
  output logic [7:0]  y,
  input  logic        we,
  input  logic [3:0]  wsel,
  input  logic [11:0] waddr,
  input  logic [7:0]  wdata
);

  localparam int unsigned E = 10;

  logic [11:0] a [E];
  logic [7:0]  o [E];

  assign a[0] = x[47:36];
  assign a[1] = x[35:24];
  assign a[2] = x[23:12];
  assign a[3] = x[11:0];
  assign a[4] = {o[1], o[2][7:4]};
  assign a[5] = {o[2][3:0], o[3]};
  assign a[6] = {o[0], o[4][7:4]};
  assign a[7] = {o[4][3:0], o[5]};
  assign a[8] = {o[6][3:0], o[7]};
  assign a[9] = {o[6][7:4], o[8]};
  assign y    = o[9];

  for (genvar e = 0; e < E; e++) begin : g_el
    pq_element #(.P(12), .Q(8)) u_el (
      .clk  (clk),
      .addr (a[e]),
      .data (o[e]),
      .we   (we && wsel == 4'(e)),
      .waddr(waddr),
      .wdata(wdata)
    );
  end

endmodule
