// qm_top: the integrated queue machine.
//
// A serial engine, a compilation engine and a spatial engine share one memory
// space. The application is a single stream of queue machine instructions.
// The serial engine runs it; when it meets a loopbegin/loopend loop it runs
// the first iteration itself while the compilation engine (qm_row_placer)
// places that iteration's instructions on the fabric, then hands the rest of
// the loop to the spatial engine (qm_spatial_engine) and takes control back
// when the loop exits. With spatial_en low every loop runs serially, which
// gives the reference behaviour of the same program.
//
// Host interface (active while the machine is idle or halted): imem_* loads
// the program, lut_* the 6-bit lookup table, hmem_* reads and writes the data
// memory (combinational read). start (one cycle) clears the operand queue and
// runs from address 0; halted rises when halt executes, error on a queue
// fault or misplaced loop instruction. spatial_active is high while the
// fabric runs a loop; handoff pulses when it starts one. compile_done pulses
// when the placer closes a loop body, with compile_ok and the reason of a
// rejection (compile_abort_ctrl: control flow, compile_abort_size: too big).
// Sizes: ROWS x COLS physical fabric, loops of up to VROWS rows (deeper than
// ROWS through row virtualization) of up to VCOLS instructions each (wider
// than COLS through width virtualization), QDEPTH queue entries, 2**IAW instruction
// words, 2**AW data words. None of these is given by the document; see the README.
module qm_top
  import qm_pkg::*;
#(
  parameter int ROWS   = 8,
  parameter int COLS   = 8,
  parameter int VCOLS  = 32,
  parameter int VROWS  = 240,
  parameter int QDEPTH = 64,
  parameter int IAW    = 10,
  parameter int AW     = 10
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           spatial_en,
  input  logic           imem_we,
  input  logic [IAW-1:0] imem_waddr,
  input  instr_t         imem_wdata,
  input  logic           lut_we,
  input  logic [5:0]     lut_waddr,
  input  logic [DW-1:0]  lut_wdata,
  input  logic [AW-1:0]  hmem_addr,
  input  logic           hmem_we,
  input  logic [DW-1:0]  hmem_wdata,
  output logic [DW-1:0]  hmem_rdata,
  output logic           running,
  output logic           halted,
  output logic           error,
  output logic           spatial_active,
  output logic           handoff,
  output logic           compile_done,
  output logic           compile_ok,
  output logic           compile_abort_ctrl,
  output logic           compile_abort_size
);
  localparam int NFU = ROWS * COLS;
  localparam int NP  = NFU + 2;

  // memory and table ports: 0 host, 1 serial engine, 2.. fabric units
  logic [AW-1:0] m_addr  [NP];
  logic          m_we    [NP];
  logic [DW-1:0] m_wdata [NP];
  logic [DW-1:0] m_rdata [NP];
  logic [5:0]    t_addr  [NFU+1];
  logic [DW-1:0] t_rdata [NFU+1];

  logic [AW-1:0] f_addr  [NFU];
  logic          f_we    [NFU];
  logic [DW-1:0] f_wdata [NFU];
  logic [DW-1:0] f_rdata [NFU];
  logic [5:0]    f_taddr [NFU];
  logic [DW-1:0] f_trdata[NFU];

  logic [IAW-1:0] pc;
  instr_t         ins;

  logic        pl_start, pl_q_empty, pl_trace_valid, pl_finish, pl_done, pl_ok;
  instr_t      pl_trace_ins;
  logic [7:0]  pl_rows, cfg_row, cfg_col;
  logic        cfg_clear, cfg_we, ab_ctrl, ab_size;
  cfg_t        cfg_w;

  logic          sp_start, sp_done, sp_busy;
  logic [DW-1:0] sp_first, sp_last, sp_step;
  logic [7:0]    sp_rows;

  qm_imem #(.IAW(IAW)) u_imem (
    .clk(clk), .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .raddr(pc), .rdata(ins)
  );

  qm_data_mem #(.AW(AW), .NP(NP)) u_mem (
    .clk(clk), .addr(m_addr), .we(m_we), .wdata(m_wdata), .rdata(m_rdata)
  );

  qm_lut_table #(.NRD(NFU+1)) u_lut (
    .clk(clk), .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .raddr(t_addr), .rdata(t_rdata)
  );

  assign m_addr[0]  = hmem_addr;
  assign m_we[0]    = hmem_we;
  assign m_wdata[0] = hmem_wdata;
  assign hmem_rdata = m_rdata[0];

  for (genvar k = 0; k < NFU; k++) begin : g_port
    assign m_addr[k+2]  = f_addr[k];
    assign m_we[k+2]    = f_we[k];
    assign m_wdata[k+2] = f_wdata[k];
    assign f_rdata[k]   = m_rdata[k+2];
    assign t_addr[k+1]  = f_taddr[k];
    assign f_trdata[k]  = t_rdata[k+1];
  end

  qm_serial_engine #(.QDEPTH(QDEPTH), .IAW(IAW), .AW(AW)) u_serial (
    .clk(clk), .rst_n(rst_n), .start(start), .spatial_en(spatial_en),
    .imem_addr(pc), .imem_data(ins),
    .mem_addr(m_addr[1]), .mem_we(m_we[1]), .mem_wdata(m_wdata[1]), .mem_rdata(m_rdata[1]),
    .lut_addr(t_addr[0]), .lut_rdata(t_rdata[0]),
    .pl_start(pl_start), .pl_q_empty(pl_q_empty), .pl_trace_valid(pl_trace_valid),
    .pl_trace_ins(pl_trace_ins), .pl_finish(pl_finish), .pl_ok(pl_ok), .pl_rows(pl_rows),
    .sp_start(sp_start), .sp_first(sp_first), .sp_last(sp_last), .sp_step(sp_step),
    .sp_rows(sp_rows), .sp_done(sp_done),
    .running(running), .halted(halted), .error(error)
  );

  qm_row_placer #(.ROWS(VROWS), .COLS(VCOLS)) u_placer (
    .clk(clk), .rst_n(rst_n), .start(pl_start), .q_empty(pl_q_empty),
    .trace_valid(pl_trace_valid), .trace_ins(pl_trace_ins), .finish(pl_finish),
    .cfg_clear(cfg_clear), .cfg_we(cfg_we), .cfg_row(cfg_row), .cfg_col(cfg_col), .cfg(cfg_w),
    .done(pl_done), .ok(pl_ok), .rows_used(pl_rows),
    .abort_ctrl(ab_ctrl), .abort_size(ab_size)
  );

  qm_spatial_engine #(.ROWS(ROWS), .COLS(COLS), .VCOLS(VCOLS), .VROWS(VROWS), .AW(AW)) u_spatial (
    .clk(clk), .rst_n(rst_n),
    .cfg_clear(cfg_clear), .cfg_we(cfg_we), .cfg_row(cfg_row), .cfg_col(cfg_col), .cfg_wdata(cfg_w),
    .start(sp_start), .first(sp_first), .last(sp_last), .step(sp_step), .rows_used(sp_rows),
    .busy(sp_busy), .done(sp_done), .end_idx(),
    .mem_addr(f_addr), .mem_we(f_we), .mem_wdata(f_wdata), .mem_rdata(f_rdata),
    .lut_addr(f_taddr), .lut_rdata(f_trdata)
  );

  assign spatial_active = sp_busy;
  assign handoff        = sp_start;
  assign compile_done   = pl_done;
  assign compile_ok     = pl_ok;
  assign compile_abort_ctrl = ab_ctrl;
  assign compile_abort_size = ab_size;
endmodule
