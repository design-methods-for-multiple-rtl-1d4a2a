// ex43_addr_gen: a 5-input address generator of weight 7 whose first cell
// is much smaller than the weight suggests.
//
// F(x1..x5) = x3 x4 x5 (as a number) when x1 = x2 = 0, and 0 otherwise, so
// the vectors 00001..00111 get addresses 1..7. With bound variables (x1, x2)
// the decomposition chart has only two distinct columns, so H needs just
// one output: y1 = 1 exactly when x1 x2 = 00. G then reads y1 x3 x4 x5 and
// gives f1 f2 f3. H is a 2-input 1-output element (4 bits), G a 4-input
// 3-output element (48 bits), although the weight 7 would call for 3 rails
// in general.
//
// Interface: x[4:0] with x[4] = x1, x[0] = x5; f[2:0] with f[2] = f1; y1 is
// the single rail. Combinational, fixed contents. Both tables are the
// published truth tables of H and G.
module ex43_addr_gen (
  input  logic [4:0] x,
  output logic [2:0] f,
  output logic       y1
);

  // H: index x1 x2 -> y1
  localparam logic [0:0] H_TBL [4] = '{
    1'b1, 1'b0, 1'b0, 1'b0
  };

  // G: index y1 x3 x4 x5 -> f1 f2 f3
  localparam logic [2:0] G_TBL [16] = '{
    3'b000, 3'b000, 3'b000, 3'b000, 3'b000, 3'b000, 3'b000, 3'b000,
    3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b101, 3'b110, 3'b111
  };

  assign y1 = H_TBL[x[4:3]];
  assign f  = G_TBL[{y1, x[2:0]}];

endmodule
