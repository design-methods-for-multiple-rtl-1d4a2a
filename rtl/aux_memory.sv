// aux_memory: the auxiliary memory of an address generator.
//
// For every address 1..k it holds the n-bit registered vector that the
// address stands for, so that an address produced by a cascade realised
// with don't cares can be checked against the query. It has alpha =
// ceil(log2(k + 1)) address inputs and n data outputs (n * 2^alpha bits).
//
// Interface: synchronous write port (we, waddr, wdata on the rising edge of
// clk), asynchronous read (addr -> data), no reset. Word 0 is never checked
// against anything useful (address 0 already means "not registered") and
// may hold any value. The size is the one of the dictionary lists
// (alpha = 9, n = 40); the write port and the asynchronous read are this
// design's choices.
module aux_memory #(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned DATA_W = 40
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign data = mem[addr];

endmodule
