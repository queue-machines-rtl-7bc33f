// qm_row_placer: the compilation engine. It turns the first serial execution
// of a loop body into a placement on the ROWS x COLS fabric.
//
// The row of each instruction follows the document's row placement algorithm.
// Two counters are kept: this_q, the operands still to be consumed by the
// current row, and next_q, the operands the current row has produced for the
// next one. An instruction that needs more operands than this_q holds opens a
// new row (this_q = next_q - inputs, next_q = outputs); otherwise it joins the
// current row (this_q -= inputs, next_q += outputs). The column follows the
// document's right-justified rule: a counter cleared on a new row and
// incremented for each further instruction on the same row.
//
// Because a queue is first-in first-out, each row's outputs form one list in
// program order, and each row consumes the previous row's list from the front.
// The placer therefore also records, for each instruction, where its operands
// start in the previous row's list (in_base) and where its results start in its
// own row's list (out_base); that is the routing for a complete interconnect.
//
// Interface and timing: start (one cycle) clears the counters and must carry
// q_empty, the serial queue being empty at loop entry. Each trace_valid cycle
// places one instruction and, in the same cycle, drives cfg_we/cfg_row/cfg_col
// /cfg. finish (one cycle) closes the body; on the next cycle done pulses with
// ok and rows_used. The loop is rejected (ok = 0) if the body holds a control
// flow instruction (the document's abort rule), if it needs more rows or
// columns than the fabric has, if an instruction would read an operand not
// produced in the body, or if operands are left over at the end. The
// rejection rules other than control flow are this design's choices.
module qm_row_placer
  import qm_pkg::*;
#(
  parameter int ROWS = 8,
  parameter int COLS = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         q_empty,
  input  logic         trace_valid,
  input  instr_t       trace_ins,
  input  logic         finish,
  output logic         cfg_clear,
  output logic         cfg_we,
  output logic [7:0]   cfg_row,
  output logic [7:0]   cfg_col,
  output cfg_t         cfg,
  output logic         done,
  output logic         ok,
  output logic [7:0]   rows_used,
  output logic         abort_ctrl,   // last rejection: control flow in body
  output logic         abort_size    // last rejection: fabric too small
);
  typedef logic signed [SLOTW+1:0] q_t;

  logic       active, aborted, placed_any, ab_ctrl, ab_size;
  logic [8:0] row, col_next;
  q_t         this_q, next_q;
  slot_t      in_ptr;

  // combinational placement of the traced instruction
  logic [1:0] nin, nout;
  logic       new_row;
  logic [8:0] p_row, p_col, n_col;
  q_t         n_this, n_next;
  slot_t      p_in_base, p_out_base, n_inptr;
  logic       bad_shape, bad_size, bad_ctrl;

  always_comb begin
    nin     = n_in(trace_ins.op);
    nout    = n_out(trace_ins);
    new_row = (this_q - q_t'(nin)) < 0;
    if (new_row) begin
      p_row      = row + 9'd1;
      p_col      = '0;
      n_col      = 9'd1;
      p_in_base  = '0;
      p_out_base = '0;
      n_this     = next_q - q_t'(nin);
      n_next     = q_t'(nout);
      n_inptr    = slot_t'(nin);
    end else begin
      p_row      = row;
      p_col      = col_next;
      n_col      = col_next + 9'd1;
      p_in_base  = in_ptr;
      p_out_base = slot_t'(next_q);
      n_this     = this_q - q_t'(nin);
      n_next     = next_q + q_t'(nout);
      n_inptr    = in_ptr + slot_t'(nin);
    end
    bad_shape = n_this < 0;
    bad_size  = (p_row >= 9'(ROWS)) || (p_col >= 9'(COLS));
    bad_ctrl  = !loop_legal(trace_ins.op);
  end

  wire place = active && !aborted && trace_valid;

  assign cfg_clear    = start;
  assign cfg_we       = place && !bad_shape && !bad_size && !bad_ctrl;
  assign cfg_row      = p_row[7:0];
  assign cfg_col      = p_col[7:0];
  assign cfg.valid    = 1'b1;
  assign cfg.ins      = trace_ins;
  assign cfg.in_base  = p_in_base;
  assign cfg.out_base = p_out_base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; aborted <= 1'b0; placed_any <= 1'b0;
      row <= '0; col_next <= '0; this_q <= '0; next_q <= '0; in_ptr <= '0;
      done <= 1'b0; ok <= 1'b0; rows_used <= '0; ab_ctrl <= 1'b0; ab_size <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        active <= 1'b1; aborted <= !q_empty; placed_any <= 1'b0;
        row <= '0; col_next <= '0; this_q <= '0; next_q <= '0; in_ptr <= '0;
        ab_ctrl <= 1'b0; ab_size <= 1'b0;
      end else if (finish && active) begin
        active    <= 1'b0;
        done      <= 1'b1;
        ok        <= !aborted && placed_any && this_q == 0 && next_q == 0;
        rows_used <= row[7:0] + 8'd1;
      end else if (place) begin
        if (bad_shape || bad_size || bad_ctrl) begin
          aborted <= 1'b1;
          ab_ctrl <= bad_ctrl;
          ab_size <= bad_size && !bad_ctrl;
        end else begin
          placed_any <= 1'b1;
          row      <= p_row;
          col_next <= n_col;
          this_q   <= n_this;
          next_q   <= n_next;
          in_ptr   <= n_inptr;
        end
      end
    end
  end

  assign abort_ctrl = ab_ctrl;
  assign abort_size = ab_size;
endmodule
