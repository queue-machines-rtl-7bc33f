// qm_spatial_engine: the reconfigurable fabric that runs a compiled loop,
// with row and width virtualization.
//
// ROWS x COLS functional units (qm_fu) in physical rows joined in a ring: each
// row takes its operands from the output registers of the row before it
// (row 0 from row ROWS-1) through a complete interconnect (qm_interconnect).
// The compilation engine writes the loop's placement, one cfg_t per
// instruction, into a configuration memory of VROWS virtual rows of VCOLS
// virtual columns (cfg_clear, cfg_we, cfg_row, cfg_col, cfg_wdata). cfg_clear
// invalidates every position in one cycle through a valid bit per position;
// positions not written since then hold no instruction.
//
// Width virtualization (the register option of the document, not its memory
// option): a virtual row may be up to VCOLS wide on COLS physical units. The
// engine tracks the widest row written since cfg_clear and runs every fabric
// step as M = ceil(width / COLS) micro-cycles; in micro-cycle m, physical
// unit c computes virtual column m*COLS + c. Each row keeps a staging
// register and an output register per virtual column: results go to the
// staging registers, and at the last micro-cycle of the step the whole
// virtual row moves to the output registers, which the next row reads
// through a complete interconnect over all VCOLS columns. With M = 1 this is
// the plain fabric. Every cycle count below counts steps; a step is M
// cycles. Using the same M for every row is this design's choice.
//
// start (one cycle) launches loop iterations with the index running from
// first, in steps of step, while it stays below last (signed); each iteration
// carries its own copy of the index down the pipeline. A row whose virtual
// stage is the last one of the loop passes nothing on.
//
// Direct mode (rows_used <= ROWS): physical row r runs virtual row r. One
// iteration enters per cycle, so the fabric starts and completes one iteration
// per cycle, as the document describes. With N iterations and R = rows_used,
// busy is high for the N + R cycles after the start cycle; done pulses in the
// last of them. With M micro-cycles per step busy lasts M*(N+R-1) + 1 cycles.
//
// Virtualized mode (rows_used = V > ROWS = P): pipeline reconfiguration as in
// PipeRench. In the t-th cycle after start, physical row t mod P is loaded
// with virtual row t mod V from the configuration memory, so every physical
// row is rewritten every P cycles and one row is being configured while the
// other P-1 compute. A group of P-1 iterations enters at cycles kV+1 .. kV+P-1
// behind the configuration of virtual row 0 and follows the reconfiguration
// wave through all V virtual rows. Throughput is (P-1)/V iterations per
// cycle. With N iterations in K = ceil(N/(P-1)) groups and d = N-1-(K-1)(P-1)
// iterations ahead of the last one in the last group, busy lasts
// V*K + d + 2 cycles after the start cycle (M*(V*K+d+1) + 1 with M
// micro-cycles per step).
//
// end_idx is the first index that failed the bound. Loads and stores use one
// shared-memory port per unit. Bodies must carry no memory dependence between
// iterations, as in the document's example. The ring, the index pipeline, the
// grouping of iterations and the exact timing are this design's choices.
module qm_spatial_engine
  import qm_pkg::*;
#(
  parameter int ROWS  = 8,
  parameter int COLS  = 8,
  parameter int VCOLS = 32,
  parameter int VROWS = 240,
  parameter int AW    = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_clear,
  input  logic          cfg_we,
  input  logic [7:0]    cfg_row,
  input  logic [7:0]    cfg_col,
  input  cfg_t          cfg_wdata,
  input  logic          start,
  input  logic [DW-1:0] first,
  input  logic [DW-1:0] last,
  input  logic [DW-1:0] step,
  input  logic [7:0]    rows_used,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] end_idx,
  output logic [AW-1:0] mem_addr  [ROWS*COLS],
  output logic          mem_we    [ROWS*COLS],
  output logic [DW-1:0] mem_wdata [ROWS*COLS],
  input  logic [DW-1:0] mem_rdata [ROWS*COLS],
  output logic [5:0]    lut_addr  [ROWS*COLS],
  input  logic [DW-1:0] lut_rdata [ROWS*COLS]
);
  localparam int MMAX = (VCOLS + COLS - 1) / COLS;   // most micro-cycles per step

  cfg_t          cmem  [VROWS][VCOLS];  // configuration memory, virtual rows
  logic [VCOLS-1:0] cval [VROWS];       // positions written since cfg_clear
  cfg_t          drow  [ROWS][VCOLS];   // virtual rows 0..ROWS-1 (direct mode)
  cfg_t          lrow  [VCOLS];         // virtual row being loaded (virtualized mode)
  cfg_t          pcfg  [ROWS][VCOLS];   // physical row configuration (virtualized mode)
  logic [7:0]    pvst  [ROWS];          // virtual row held by a physical row
  logic          pok   [ROWS];          // physical row configured since start
  cfg_t          cfg   [ROWS][VCOLS];   // configuration in use, per virtual column
  cfg_t          ucfg  [ROWS][COLS];    // configuration of each unit in this micro-cycle
  logic [7:0]    vst   [ROWS];          // virtual row in use
  logic          ok    [ROWS];
  logic          v     [ROWS];          // row r's registers hold an iteration for the next row
  logic [DW-1:0] ridx  [ROWS];
  logic [DW-1:0] res0  [ROWS][VCOLS];   // output registers, read by the next row
  logic [DW-1:0] res1  [ROWS][VCOLS];
  logic [DW-1:0] stg0  [ROWS][VCOLS];   // staging registers of earlier micro-cycles
  logic [DW-1:0] stg1  [ROWS][VCOLS];
  logic [DW-1:0] opa   [ROWS][VCOLS];
  logic [DW-1:0] opb   [ROWS][VCOLS];
  logic [DW-1:0] ua    [ROWS][COLS];
  logic [DW-1:0] ub    [ROWS][COLS];
  logic [DW-1:0] fres0 [ROWS][COLS];
  logic [DW-1:0] fres1 [ROWS][COLS];
  logic          in_v  [ROWS];
  logic [DW-1:0] in_idx[ROWS];

  logic          issuing, virt, issue_now, any_v, tick;
  logic [DW-1:0] cur, lim, stp, nxt;
  logic [7:0]    nrows, tp, tv;             // t mod P, t mod V (in steps)
  logic [7:0]    wmax;                      // widest virtual row written
  logic [7:0]    nmc, mc;                   // micro-cycles per step, current one

  assign nxt     = cur + stp;
  assign end_idx = cur;

  // configuration memory: a plain array plus one valid bit per position,
  // so that cfg_clear only has to clear the valid bits
  always_ff @(posedge clk)
    if (cfg_we && int'(cfg_row) < VROWS && int'(cfg_col) < VCOLS)
      cmem[cfg_row][cfg_col] <= cfg_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < VROWS; r++) cval[r] <= '0;
    end else if (cfg_clear) begin
      for (int r = 0; r < VROWS; r++) cval[r] <= '0;
    end else if (cfg_we && int'(cfg_row) < VROWS && int'(cfg_col) < VCOLS) begin
      cval[cfg_row][cfg_col] <= 1'b1;
    end
  end

  always_comb
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < VCOLS; c++) begin
        drow[r][c] = cmem[r % VROWS][c];
        drow[r][c].valid = cmem[r % VROWS][c].valid && cval[r % VROWS][c];
      end

  always_comb
    for (int c = 0; c < VCOLS; c++) begin
      lrow[c] = cmem[tv][c];
      lrow[c].valid = cmem[tv][c].valid && cval[tv][c];
    end

  // width of the widest row, and the micro-cycles it takes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wmax <= '0;
    else if (cfg_clear) wmax <= '0;
    else if (cfg_we && int'(cfg_col) < VCOLS && cfg_col >= wmax) wmax <= cfg_col + 8'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nmc <= 8'd1; mc <= '0;
    end else if (start) begin
      nmc <= (wmax <= 8'(COLS)) ? 8'd1 : 8'((int'(wmax) + COLS - 1) / COLS);
      mc  <= '0;
    end else if (busy) begin
      mc  <= tick ? '0 : mc + 8'd1;
    end
  end
  assign tick = busy && (mc == nmc - 8'd1);

  // configuration in use: configuration memory rows directly, or the
  // physical rows' reloaded copies
  always_comb
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < VCOLS; c++) cfg[r][c] = virt ? pcfg[r][c] : drow[r][c];
      vst[r] = virt ? pvst[r] : 8'(r);
      ok[r]  = virt ? pok[r]  : 1'b1;
    end

  // iteration issue: every step in direct mode, P-1 per V steps when
  // virtualized; issue_now holds through the micro-cycles of the step
  assign issue_now = issuing && (!virt || (tv >= 8'd1 && tv <= 8'(ROWS - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0; busy <= 1'b0; virt <= 1'b0; cur <= '0; lim <= '0; stp <= '0;
      nrows <= '0; tp <= '0; tv <= '0;
      for (int r = 0; r < ROWS; r++) begin pok[r] <= 1'b0; pvst[r] <= '0; end
    end else if (start) begin
      issuing <= ($signed(first) < $signed(last));
      busy    <= 1'b1;
      virt    <= int'(rows_used) > ROWS;
      cur     <= first;
      lim     <= last;
      stp     <= step;
      nrows   <= rows_used;
      tp      <= '0;
      tv      <= '0;
      for (int r = 0; r < ROWS; r++) pok[r] <= 1'b0;
    end else begin
      if (issue_now && tick) begin
        cur <= nxt;
        if (!($signed(nxt) < $signed(lim))) issuing <= 1'b0;
      end
      if (tick && virt) begin
        // pipeline reconfiguration: physical row t mod P takes virtual row t mod V
        for (int r = 0; r < ROWS; r++)
          if (int'(tp) == r) begin
            pvst[r] <= tv;
            pok[r]  <= 1'b1;
          end
        tp <= (int'(tp) == ROWS - 1) ? '0 : tp + 8'd1;
        tv <= (tv == nrows - 8'd1)   ? '0 : tv + 8'd1;
      end
      if (done) busy <= 1'b0;
    end
  end

  always_ff @(posedge clk)
    if (tick && virt)
      for (int r = 0; r < ROWS; r++)
        if (int'(tp) == r)
          for (int c = 0; c < VCOLS; c++) pcfg[r][c] <= lrow[c];

  always_comb begin
    any_v = 1'b0;
    for (int r = 0; r < ROWS; r++) if (v[r]) any_v = 1'b1;
  end
  assign done = busy && !start && !issuing && !any_v;

  // rows at virtual row 0 take new iterations, the others take the previous row's
  always_comb
    for (int r = 0; r < ROWS; r++) begin
      if (vst[r] == 8'd0) begin
        in_v[r]   = issue_now && ok[r];
        in_idx[r] = cur;
      end else begin
        in_v[r]   = v[(r + ROWS - 1) % ROWS] && ok[r];
        in_idx[r] = ridx[(r + ROWS - 1) % ROWS];
      end
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) begin v[r] <= 1'b0; ridx[r] <= '0; end
    end else begin
      if (start)
        for (int r = 0; r < ROWS; r++) v[r] <= 1'b0;
      else if (tick)
        for (int r = 0; r < ROWS; r++) begin
          v[r]    <= in_v[r] && (vst[r] != nrows - 8'd1);
          ridx[r] <= in_idx[r];
        end
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_ic
    qm_interconnect #(.COLS(VCOLS)) u_ic (
      .up_cfg(cfg[(r + ROWS - 1) % ROWS]), .up_res0(res0[(r + ROWS - 1) % ROWS]),
      .up_res1(res1[(r + ROWS - 1) % ROWS]),
      .dn_cfg(cfg[r]), .dn_a(opa[r]), .dn_b(opb[r])
    );
  end

  // unit c of a row serves virtual column mc*COLS + c in micro-cycle mc
  always_comb
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        ucfg[r][c] = '0;
        ua[r][c]   = '0;
        ub[r][c]   = '0;
        for (int m = 0; m < MMAX; m++)
          if (int'(mc) == m && m * COLS + c < VCOLS) begin
            ucfg[r][c] = cfg[r][m * COLS + c];
            ua[r][c]   = opa[r][m * COLS + c];
            ub[r][c]   = opb[r][m * COLS + c];
          end
      end

  // staging registers collect the micro-cycles of a step; at its last
  // micro-cycle the whole virtual row moves to the output registers
  always_ff @(posedge clk)
    for (int r = 0; r < ROWS; r++)
      if (in_v[r])
        for (int m = 0; m < MMAX; m++)
          for (int c = 0; c < COLS; c++)
            if (m * COLS + c < VCOLS) begin
              if (int'(mc) == m) begin
                stg0[r][m * COLS + c] <= fres0[r][c];
                stg1[r][m * COLS + c] <= fres1[r][c];
              end
              if (tick) begin
                res0[r][m * COLS + c] <= (int'(mc) == m) ? fres0[r][c] : stg0[r][m * COLS + c];
                res1[r][m * COLS + c] <= (int'(mc) == m) ? fres1[r][c] : stg1[r][m * COLS + c];
              end
            end

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      qm_fu #(.AW(AW)) u_fu (
        .cfg(ucfg[r][c]), .in_valid(in_v[r]), .idx(in_idx[r]),
        .a(ua[r][c]), .b(ub[r][c]),
        .mem_addr(mem_addr[r*COLS+c]), .mem_we(mem_we[r*COLS+c]),
        .mem_wdata(mem_wdata[r*COLS+c]), .mem_rdata(mem_rdata[r*COLS+c]),
        .lut_addr(lut_addr[r*COLS+c]), .lut_rdata(lut_rdata[r*COLS+c]),
        .res0(fres0[r][c]), .res1(fres1[r][c])
      );
    end
  end
endmodule
