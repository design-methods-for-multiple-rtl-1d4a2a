// pq_element: a p-input q-output memory cell, the building block of every
// address generator in this design.
//
// The cell stores a q-bit word for each of the 2^p input combinations, so it
// realises any p-input q-output function in q * 2^p bits. It is written like
// a small RAM so that the function it holds can be replaced when the set of
// registered vectors changes.
//
// Interface: a synchronous write port (we, waddr, wdata, sampled on the
// rising edge of clk) and an asynchronous read port (addr -> data). The read
// is combinational so that a chain of cells forms a purely combinational
// network, as a LUT cascade is. The cell has no reset: its contents are
// undefined until written. Read-during-write to the same word returns the
// old contents until the edge. The write port and the asynchronous read are
// choices of this design; the cell's size and function are the standard
// pq-element definition. Default P = 10, Q = 8 is the cell of the 48-input,
// 255-vector cascade example.
module pq_element #(
  parameter int unsigned P = 10,
  parameter int unsigned Q = 8
) (
  input  logic         clk,
  input  logic         we,
  input  logic [P-1:0] waddr,
  input  logic [Q-1:0] wdata,
  input  logic [P-1:0] addr,
  output logic [Q-1:0] data
);

  logic [Q-1:0] mem [2**P];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign data = mem[addr];

endmodule
