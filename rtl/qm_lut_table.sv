// qm_lut_table: the 64-entry table read by the 6-bit lookup instruction.
//
// One synchronous write port for the host, NRD combinational read ports: one
// for the serial engine and one per fabric functional unit, so every unit can
// perform a lookup in the same cycle. The document names the 6-bit table
// lookup but not the table's contents or where it lives; a single shared,
// host-loaded table is this design's choice. Contents are not reset.
module qm_lut_table
  import qm_pkg::*;
#(
  parameter int NRD = 65
) (
  input  logic          clk,
  input  logic          we,
  input  logic [5:0]    waddr,
  input  logic [DW-1:0] wdata,
  input  logic [5:0]    raddr [NRD],
  output logic [DW-1:0] rdata [NRD]
);
  logic [DW-1:0] tbl [64];

  always_ff @(posedge clk)
    if (we) tbl[waddr] <= wdata;

  always_comb
    for (int p = 0; p < NRD; p++) rdata[p] = tbl[raddr[p]];
endmodule
