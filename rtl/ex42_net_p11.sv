// ex42_net_p11: a 48-input, 8-output address generator built as an
// eight-level network of fourteen pq-elements with 11 inputs (and one with
// 9) and 8 outputs (13 x 2^11 x 8 + 2^9 x 8 = 212 kbit), the p = 11
// alternative to the 20-cell LUT cascade for up to 255 registered vectors.
//
// Each element is one step of functional decomposition: it reads primary
// inputs and/or parts of earlier elements' 8-bit codes and writes an 8-bit
// code naming which class of its inputs has been seen. Codes are split
// between successors in groups of 1 to 7 bits. Structure (element: inputs
// -> outputs), x[47] being x1:
//   e0 : x[47:37]                   -> [7:5] to e6, [4:0] to e5
//   e1 : x[36:26]                   -> [7:2] to e5, [1:0] to e7
//   e2 : x[25:15]                   -> 8 to e7
//   e3 : x[14:4]                    -> [7] to e7, [6:0] to e4
//   e4 : {e3[6:0], x[3:0]}          -> [7:5] to e8, [4:0] to e9
//   e5 : {e0[4:0], e1[7:2]}         -> 8 to e6
//   e6 : {e0[7:5], e5}              -> 8 to e10
//   e7 : {e1[1:0], e2, e3[7]}       -> 8 to e8
//   e8 : {e7, e4[7:5]}              -> [7:6] to e10, [5:0] to e9
//   e9 : {e8[5:0], e4[4:0]}         -> [7] to e10, [6:0] to e11
//   e10: {e6, e8[7:6], e9[7]}       -> [7:4] to e12, [3:0] to e11
//   e11: {e10[3:0], e9[6:0]}        -> [7:1] to e12, [0] to e13
//   e12: {e10[7:4], e11[7:1]}       -> 8 to e13
//   e13: {e12, e11[0]} (9 inputs)   -> y
// The longest path, e3-e4-e8-e9-e10-e11-e12-e13, has eight elements. The
// element count, every connection width and the levels are those of the
// published network; which primary inputs feed which element, which bits of
// a split code go where, the order of the bits in an element's address
// (first listed source in the upper bits) and the write port are this
// design's choices.
//
// Interface: x (48) -> y (8), combinational through at most eight memory
// reads. Element e is written on the rising edge of clk when we is high:
// wsel = e, waddr = element address (e13 uses waddr[8:0]), wdata = code. No
// reset; contents are undefined until written. Loading works as for the
// other networks: each input combination an element sees for a registered
// vector gets its own non-zero code, all others code 0, and the last element
// holds the address.
module ex42_net_p11 (
  input  logic        clk,
  input  logic [47:0] x,
  output logic [7:0]  y,
  input  logic        we,
  input  logic [3:0]  wsel,
  input  logic [10:0] waddr,
  input  logic [7:0]  wdata
);

  localparam int unsigned E = 13;      // 11-input elements e0..e12

  logic [10:0] a [E];
  logic [8:0]  a_last;
  logic [7:0]  o [E];

  assign a[0]  = x[47:37];
  assign a[1]  = x[36:26];
  assign a[2]  = x[25:15];
  assign a[3]  = x[14:4];
  assign a[4]  = {o[3][6:0], x[3:0]};
  assign a[5]  = {o[0][4:0], o[1][7:2]};
  assign a[6]  = {o[0][7:5], o[5]};
  assign a[7]  = {o[1][1:0], o[2], o[3][7]};
  assign a[8]  = {o[7], o[4][7:5]};
  assign a[9]  = {o[8][5:0], o[4][4:0]};
  assign a[10] = {o[6], o[8][7:6], o[9][7]};
  assign a[11] = {o[10][3:0], o[9][6:0]};
  assign a[12] = {o[10][7:4], o[11][7:1]};
  assign a_last = {o[12], o[11][0]};

  for (genvar e = 0; e < E; e++) begin : g_el
    pq_element #(.P(11), .Q(8)) u_el (
      .clk  (clk),
      .addr (a[e]),
      .data (o[e]),
      .we   (we && wsel == 4'(e)),
      .waddr(waddr),
      .wdata(wdata)
    );
  end

  pq_element #(.P(9), .Q(8)) u_last (
    .clk  (clk),
    .addr (a_last),
    .data (y),
    .we   (we && wsel == 4'(E)),
    .waddr(waddr[8:0]),
    .wdata(wdata)
  );

endmodule
