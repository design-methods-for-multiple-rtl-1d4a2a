// coincidence_gate: the check at the end of an address generator with an
// auxiliary memory.
//
// The cascade produces a temporary address; the auxiliary memory returns
// the registered vector stored at it. If that vector equals the query bit
// for bit (one XNOR per bit, ANDed together), the temporary address is the
// right one and is passed on; otherwise the query is not registered and the
// output is the special address 0. The output stage is one AND gate per
// address bit, driven by the match line.
//
// Interface: query and reg_data (N_BITS each), tmp_addr (ADDR_W); outputs
// match and addr. Purely combinational. This is the structure of the
// coincidence circuit and AND gates in the design; widths default to the
// dictionary's 40-bit words and 9-bit addresses.
module coincidence_gate #(
  parameter int unsigned N_BITS = 40,
  parameter int unsigned ADDR_W = 9
) (
  input  logic [N_BITS-1:0] query,
  input  logic [N_BITS-1:0] reg_data,
  input  logic [ADDR_W-1:0] tmp_addr,
  output logic              match,
  output logic [ADDR_W-1:0] addr
);

  assign match = &(query ~^ reg_data);
  assign addr  = tmp_addr & {ADDR_W{match}};

endmodule
