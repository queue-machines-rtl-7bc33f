// qm_data_mem: the memory space shared by all engines.
//
// 2**AW words of DW bits with NP ports. Every port reads combinationally
// (rdata follows addr in the same cycle) and writes on the clock edge when
// its we is high. If several ports write one word in the same cycle the
// lowest-numbered port wins. Port 0 is the host, port 1 the serial engine,
// the rest belong to the fabric's functional units, which gives every unit
// its own memory port: the document assumes "adequate hardware resources and
// memory ports"; the port count, the priority and the combinational read are
// this design's choices. Contents are not reset.
module qm_data_mem
  import qm_pkg::*;
#(
  parameter int AW = 10,
  parameter int NP = 66
) (
  input  logic          clk,
  input  logic [AW-1:0] addr  [NP],
  input  logic          we    [NP],
  input  logic [DW-1:0] wdata [NP],
  output logic [DW-1:0] rdata [NP]
);
  logic [DW-1:0] mem [2**AW];

  always_comb
    for (int p = 0; p < NP; p++) rdata[p] = mem[addr[p]];

  always_ff @(posedge clk)
    for (int p = NP-1; p >= 0; p--)
      if (we[p]) mem[addr[p]] <= wdata[p];
endmodule
