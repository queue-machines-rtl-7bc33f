// qm_fu: one functional unit of the spatial fabric.
//
// It holds no configuration of its own: cfg comes from the fabric's
// configuration registers. In a cycle where in_valid is high (a loop iteration
// is at this row) the unit executes cfg.ins on the operands a and b delivered
// by the interconnect, with idx the loop index of that iteration. A load reads
// the shared memory through its own port, a store writes it (mem_we), a lookup
// reads the table. The results (res0, and res1 for swap) are combinational:
// the fabric keeps the output registers of its rows itself, because with
// width virtualization one physical unit computes several virtual columns
// of a row in turn and each virtual column needs its own register. Every
// unit executes every loop-legal instruction, as the document requires.
module qm_fu
  import qm_pkg::*;
#(
  parameter int AW = 10
) (
  input  cfg_t          cfg,
  input  logic          in_valid,
  input  logic [DW-1:0] idx,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [AW-1:0] mem_addr,
  output logic          mem_we,
  output logic [DW-1:0] mem_wdata,
  input  logic [DW-1:0] mem_rdata,
  output logic [5:0]    lut_addr,
  input  logic [DW-1:0] lut_rdata,
  output logic [DW-1:0] res0,
  output logic [DW-1:0] res1
);
  logic st;

  qm_alu #(.AW(AW)) u_alu (
    .ins(cfg.ins), .a(a), .b(b), .idx(idx),
    .mem_rdata(mem_rdata), .lut_rdata(lut_rdata),
    .res0(res0), .res1(res1),
    .mem_addr(mem_addr), .mem_st(st), .mem_wdata(mem_wdata), .lut_addr(lut_addr)
  );

  assign mem_we = in_valid && cfg.valid && st;

endmodule
