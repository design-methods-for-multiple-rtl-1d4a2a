// ex41_addr_gen: a 5-input address generator of weight 7 realised as two
// 4-input 3-output memories, H and G.
//
// The function F(x1..x5) gives addresses 1..7 to seven registered vectors
// (x1 x2 x3 x4 x5):
//   00010 -> 1, 00101 -> 2, 01000 -> 3, 01100 -> 4, 01110 -> 5,
//   01111 -> 6, 11001 -> 7, every other vector -> 0.
// Functional decomposition with bound variables (x1..x4) and free variable
// x5 gives F = G(H(x1..x4), x5). H numbers the six columns of the
// decomposition chart that hold a non-zero entry (1..6) and maps the other
// columns to 0; G reads that 3-bit column code y1 y2 y3 and x5 and gives
// the address f1 f2 f3. Each is a 4-input 3-output element (48 bits).
//
// Interface: x[4:0] with x[4] = x1, x[0] = x5; f[2:0] with f[2] = f1 (MSB);
// y[2:0] (y[2] = y1) is the rail between the two cells. Combinational, fixed
// contents, no clock. H is the published truth table; G is read off the
// published decomposition chart of G.
module ex41_addr_gen (
  input  logic [4:0] x,
  output logic [2:0] f,
  output logic [2:0] y
);

  // H: index x1 x2 x3 x4 -> y1 y2 y3
  localparam logic [2:0] H_TBL [16] = '{
    3'b000, 3'b001, 3'b010, 3'b000, 3'b011, 3'b000, 3'b100, 3'b101,
    3'b000, 3'b000, 3'b000, 3'b000, 3'b110, 3'b000, 3'b000, 3'b000
  };

  // G: index y1 y2 y3 x5 -> f1 f2 f3
  localparam logic [2:0] G_TBL [16] = '{
    3'b000, 3'b000, 3'b001, 3'b000, 3'b000, 3'b010, 3'b011, 3'b000,
    3'b100, 3'b000, 3'b101, 3'b110, 3'b000, 3'b111, 3'b000, 3'b000
  };

  assign y = H_TBL[x[4:1]];
  assign f = G_TBL[{y, x[0]}];

endmodule
