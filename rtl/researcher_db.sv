// researcher_db: a small database of researchers looked up by a six-letter
// ID.
//
// The ID (6 characters of 5 bits: 26 letters, underscore, blank) is a
// 30-bit query; at most 8000 researchers are registered, so a 13-bit
// researcher number suffices. An address generator turns a registered ID
// into its number 1..8000 and any other ID into 0 (out of 2^30 possible
// IDs only 8000 are used). A memory indexed by that number holds the record:
// last name, first name, two research areas and location. An unknown ID
// reads an all-zero record.
//
// Record layout (MSB first): last name, first name, area 1, area 2,
// location, each FIELD_CHARS characters of CHAR_W bits, first character in
// the upper bits, blank-padded.
//
// Interface: id (30) -> found, number (13), record, combinational.
// Loading on the rising edge of clk: c_* cascade cells and a_* auxiliary
// memory of the address generator, r_* records. No reset.
//
// The 30-bit ID, the 13-bit number and the list of fields follow the
// database's description; the address generator kind (with auxiliary
// memory, 15-input cells, 9 cells), the field width (18 characters) and
// the character code are this design's choices.
module researcher_db
  import mvag_pkg::*;
#(
  parameter int unsigned ID_CHARS    = 6,
  parameter int unsigned CHAR_W      = LETTER_BITS,
  parameter int unsigned NUM_W       = 13,
  parameter int unsigned FIELD_CHARS = 18,
  parameter int unsigned P           = NUM_W + 2,
  localparam int unsigned ID_W   = ID_CHARS * CHAR_W,
  localparam int unsigned REC_W  = 5 * FIELD_CHARS * CHAR_W,
  localparam int unsigned S      = cascade_cells(ID_W, P, NUM_W),
  localparam int unsigned CELL_W = sel_width(S)
) (
  input  logic              clk,
  input  logic [ID_W-1:0]   id,
  output logic              found,
  output logic [NUM_W-1:0]  number,
  output logic [REC_W-1:0]  record,
  // loading
  input  logic              c_we,
  input  logic [CELL_W-1:0] c_cell,
  input  logic [P-1:0]      c_addr,
  input  logic [NUM_W-1:0]  c_data,
  input  logic              a_we,
  input  logic [NUM_W-1:0]  a_addr,
  input  logic [ID_W-1:0]   a_data,
  input  logic              r_we,
  input  logic [NUM_W-1:0]  r_addr,
  input  logic [REC_W-1:0]  r_data
);

  logic [NUM_W-1:0] tmp;   // temporary address, observation only

  addr_gen_aux #(.N_BITS(ID_W), .ADDR_W(NUM_W), .P(P)) u_ag (
    .clk     (clk),
    .query   (id),
    .addr    (number),
    .hit     (found),
    .tmp_addr(tmp),
    .c_we    (c_we),
    .c_cell  (c_cell),
    .c_addr  (c_addr),
    .c_data  (c_data),
    .a_we    (a_we),
    .a_addr  (a_addr),
    .a_data  (a_data)
  );

  // record memory: same structure as the translation memory, zero at 0
  translation_rom #(.ADDR_W(NUM_W), .DATA_W(REC_W)) u_mem (
    .clk  (clk),
    .we   (r_we),
    .waddr(r_addr),
    .wdata(r_data),
    .addr (number),
    .data (record)
  );

endmodule
