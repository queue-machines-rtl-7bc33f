// qm_imem: instruction memory of the serial engine.
//
// 2**IAW instruction words, written by the host one word per clock and read
// combinationally at the serial engine's program counter. The document holds
// the whole application as one serial instruction stream; its storage is not
// described, so this plain array is this design's choice. Not reset.
module qm_imem
  import qm_pkg::*;
#(
  parameter int IAW = 10
) (
  input  logic           clk,
  input  logic           we,
  input  logic [IAW-1:0] waddr,
  input  instr_t         wdata,
  input  logic [IAW-1:0] raddr,
  output instr_t         rdata
);
  instr_t mem [2**IAW];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
