// translation_rom: the memory that turns a dictionary address into the
// translated word.
//
// An address generator finds the 9-bit address of an English word; this
// memory holds, for each address, the 80-bit code of the Japanese word
// (kanji and kana). Its contents are data, not logic, so it is modelled as a
// loadable read-only memory: a write port fills it (in a product it would be
// programmed once), the read port is asynchronous. Address 0, which the
// generator returns for unknown words, reads as all zeros whatever was
// written there, so an unknown word never shows a translation.
//
// Interface: load port (we, waddr, wdata on the rising edge of clk), read
// port addr -> data, combinational. Sizes (9 inputs, 80 outputs) follow the
// dictionary; the load port and the forced zero at address 0 are this
// design's choices.
module translation_rom #(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned DATA_W = 80
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

  assign data = (addr == '0) ? '0 : mem[addr];

endmodule
