// ex71_addr_gen: an 11-input address generator for 15 registered vectors,
// built as a three-cell LUT cascade plus an auxiliary memory.
//
// The registered vectors (x1..x11) and their addresses 1..15 are:
//    1 00100101100   2 00111110101   3 00111110110   4 01001100101
//    5 01001101111   6 10000100100   7 10001100101   8 10001101001
//    9 10001101111  10 10100001001  11 10100100100  12 11000110101
//   13 11001001111  14 11010000000  15 11010001001
// The cascade was derived with all other inputs as don't cares, which lets
// it skip x1 and x5 and use only two rails between cells:
//   cell 1: x2 x3 x4 x6 x7 -> u1 u2      (5 in, 2 out)
//   cell 2: u1 u2 x8       -> u3 u4      (3 in, 2 out)
//   cell 3: u3 u4 x9 x10 x11 -> z3..z0   (5 in, 4 out)
// (z3..z0) is a temporary address. It is correct for every registered
// vector but arbitrary for other inputs, so the auxiliary memory (16 x 11
// bits) returns the vector registered at that address, a coincidence
// circuit compares it with x1..x11, and four AND gates pass (z3..z0) as
// (f3..f0) on a match and force 0 otherwise. Cell memory: 64 + 16 + 128 =
// 208 bits, plus 176 bits of auxiliary memory.
//
// Interface: x[10:0] with x[10] = x1 and x[0] = x11; outputs f[3:0]
// (f3 = MSB) and the temporary address z. Purely combinational; the tables
// are fixed, so there is nothing to load and nothing to reset.
//
// The cell contents and the auxiliary memory are the published ones. In the
// 3rd cell's table the 4-bit codes are read with the leftmost bit as z0:
// only that order makes the cascade produce the listed address of every
// registered vector. Auxiliary word 0 is never used to pass an address and
// is set to zero.
module ex71_addr_gen (
  input  logic [10:0] x,
  output logic [3:0]  f,
  output logic [3:0]  z
);

  // Index of each table is the cell's input word, first-listed input in the MSB.
  localparam logic [1:0] CELL1 [32] = '{
    2'b00, 2'b01, 2'b10, 2'b11, 2'b01, 2'b00, 2'b00, 2'b01,
    2'b01, 2'b00, 2'b00, 2'b01, 2'b00, 2'b01, 2'b10, 2'b11,
    2'b01, 2'b00, 2'b00, 2'b01, 2'b00, 2'b01, 2'b10, 2'b11,
    2'b00, 2'b01, 2'b10, 2'b11, 2'b01, 2'b00, 2'b00, 2'b01
  };

  localparam logic [1:0] CELL2 [8] = '{
    2'b00, 2'b01, 2'b01, 2'b00, 2'b10, 2'b10, 2'b11, 2'b00
  };

  localparam logic [3:0] CELL3 [32] = '{
    4'b1110, 4'b1010, 4'b1110, 4'b1010, 4'b1011, 4'b0100, 4'b0011, 4'b1101,
    4'b1110, 4'b1111, 4'b1110, 4'b1010, 4'b0001, 4'b1100, 4'b1110, 4'b0101,
    4'b1110, 4'b1000, 4'b1110, 4'b1010, 4'b0110, 4'b0111, 4'b1110, 4'b1001,
    4'b1110, 4'b1010, 4'b1110, 4'b1010, 4'b1110, 4'b0010, 4'b0011, 4'b1101
  };

  localparam logic [10:0] AUX [16] = '{
    11'b00000000000, 11'b00100101100, 11'b00111110101, 11'b00111110110,
    11'b01001100101, 11'b01001101111, 11'b10000100100, 11'b10001100101,
    11'b10001101001, 11'b10001101111, 11'b10100001001, 11'b10100100100,
    11'b11000110101, 11'b11001001111, 11'b11010000000, 11'b11010001001
  };

  // x1 .. x11 as individual variables
  function automatic logic xv(input logic [10:0] v, input int unsigned i);
    return v[11 - i];
  endfunction

  logic [1:0]  u12, u34;
  logic [10:0] y;
  logic        match;

  assign u12 = CELL1[{xv(x, 2), xv(x, 3), xv(x, 4), xv(x, 6), xv(x, 7)}];
  assign u34 = CELL2[{u12, xv(x, 8)}];
  assign z   = CELL3[{u34, xv(x, 9), xv(x, 10), xv(x, 11)}];
  assign y   = AUX[z];

  coincidence_gate #(.N_BITS(11), .ADDR_W(4)) u_coin (
    .query   (x),
    .reg_data(y),
    .tmp_addr(z),
    .match   (match),
    .addr    (f)
  );

endmodule
