// qm_serial_engine: executes queue machine code one instruction per cycle and
// manages the hand-off of loops to the spatial engine.
//
// Each RUN cycle fetches the instruction at pc (combinational instruction
// memory), reads its operands from the operand queue head, computes with
// qm_alu and, at the clock edge, pops the operands and appends the results.
// Loads and stores use the shared memory at address loop index + imm; outside
// a loop the index reads as zero, so addresses there are absolute.
//
// Loops. loopbegin reads min then max from the queue and takes its immediate
// as the step (0 counts as 1). If min >= max the engine skips, one word per
// cycle, past the matching loopend. Otherwise the first iteration runs
// serially; when spatial_en is set, every instruction executed in it is also
// streamed to the compilation engine (pl_trace_valid/pl_trace_ins), after
// pl_start at loopbegin. At the first loopend the engine raises pl_finish and
// waits one cycle (FINISH) for the placer's verdict. If the body was placed and
// iterations remain, it starts the spatial engine with the next index and
// waits (SPATIAL) for sp_done, then continues after loopend: the serial engine is suspended while the fabric
// runs and regains control when the loop exits, as the document describes.
// If the body was rejected, or spatial_en is low, the loop runs serially.
//
// halted goes high after halt; error goes high on a queue underflow or
// overflow, a loopend outside a loop, or a loop nested in a loop. The engine
// then stops. The single loop context (no nesting), the bounds and step taken
// from the queue and immediate, branch/jump/halt and the error rules are this
// design's choices; the document only requires loops free of control flow.
module qm_serial_engine
  import qm_pkg::*;
#(
  parameter int QDEPTH = 64,
  parameter int IAW    = 10,
  parameter int AW     = 10
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           spatial_en,
  // instruction memory
  output logic [IAW-1:0] imem_addr,
  input  instr_t         imem_data,
  // shared memory and lookup table
  output logic [AW-1:0]  mem_addr,
  output logic           mem_we,
  output logic [DW-1:0]  mem_wdata,
  input  logic [DW-1:0]  mem_rdata,
  output logic [5:0]     lut_addr,
  input  logic [DW-1:0]  lut_rdata,
  // compilation engine
  output logic           pl_start,
  output logic           pl_q_empty,
  output logic           pl_trace_valid,
  output instr_t         pl_trace_ins,
  output logic           pl_finish,
  input  logic           pl_ok,
  input  logic [7:0]     pl_rows,
  // spatial engine
  output logic           sp_start,
  output logic [DW-1:0]  sp_first,
  output logic [DW-1:0]  sp_last,
  output logic [DW-1:0]  sp_step,
  output logic [7:0]     sp_rows,
  input  logic           sp_done,
  // status
  output logic           running,
  output logic           halted,
  output logic           error
);
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_SKIP, S_FINISH, S_SPATIAL, S_HALT, S_ERR} state_e;

  state_e         state;
  logic [IAW-1:0] pc, body_pc;
  logic [DW-1:0]  idx, lmax, lstep, nidx;
  logic           in_loop, first_iter, compiling;

  instr_t         ins;
  logic [1:0]     nin, nout;
  logic [DW-1:0]  head0, head1, res0, res1;
  logic [DW-1:0]  push_d [MAXOUT];
  logic [$clog2(QDEPTH+1)-1:0] qcount;
  logic           q_empty, q_over, q_under, st;
  logic           exec;
  logic [1:0]     pop_n, push_n;
  logic [DW-1:0]  next_idx;
  logic [IAW-1:0] pc_rel;

  assign ins       = imem_data;
  assign imem_addr = pc;
  assign exec      = (state == S_RUN);
  assign nin       = n_in(ins.op);
  assign nout      = n_out(ins);
  assign pop_n     = exec ? nin  : 2'd0;
  assign push_n    = exec ? nout : 2'd0;
  assign next_idx  = idx + lstep;
  assign pc_rel    = pc + IAW'(signed'(ins.imm));

  qm_alu #(.AW(AW)) u_alu (
    .ins(ins), .a(head0), .b(head1), .idx(in_loop ? idx : '0),
    .mem_rdata(mem_rdata), .lut_rdata(lut_rdata),
    .res0(res0), .res1(res1),
    .mem_addr(mem_addr), .mem_st(st), .mem_wdata(mem_wdata), .lut_addr(lut_addr)
  );
  assign mem_we = exec && st && !q_under;

  always_comb begin
    push_d[0] = res0;
    push_d[1] = (ins.op == OP_SWAP) ? res1 : res0;
    push_d[2] = res0;
  end

  qm_operand_queue #(.DEPTH(QDEPTH)) u_q (
    .clk(clk), .rst_n(rst_n), .clear(start),
    .pop_n(pop_n), .push_n(push_n), .push_d(push_d),
    .head0(head0), .head1(head1), .count(qcount), .empty(q_empty),
    .overflow(q_over), .underflow(q_under)
  );

  // compilation engine interface
  assign pl_start       = exec && ins.op == OP_LOOPBEGIN && spatial_en && !in_loop
                          && $signed(head0) < $signed(head1) && !q_under;
  assign pl_q_empty     = (int'(qcount) == 2);
  assign pl_trace_valid = exec && compiling && first_iter && ins.op != OP_LOOPEND;
  assign pl_trace_ins   = ins;
  assign pl_finish      = exec && compiling && first_iter && ins.op == OP_LOOPEND;

  // spatial engine interface
  assign sp_start = (state == S_FINISH) && pl_ok && $signed(nidx) < $signed(lmax);
  assign sp_first = nidx;
  assign sp_last  = lmax;
  assign sp_step  = lstep;
  assign sp_rows  = pl_rows;

  assign running = (state != S_IDLE) && (state != S_HALT) && (state != S_ERR);
  assign halted  = (state == S_HALT);
  assign error   = (state == S_ERR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pc <= '0; body_pc <= '0;
      idx <= '0; lmax <= '0; lstep <= '0; nidx <= '0;
      in_loop <= 1'b0; first_iter <= 1'b0; compiling <= 1'b0;
    end else if (start) begin
      state <= S_RUN; pc <= '0; idx <= '0;
      in_loop <= 1'b0; first_iter <= 1'b0; compiling <= 1'b0;
    end else begin
      unique case (state)
        S_RUN: begin
          if (q_under || q_over) begin
            state <= S_ERR;
          end else begin
            pc <= pc + 1'b1;
            unique case (ins.op)
              OP_HALT: begin
                state <= S_HALT;
                pc    <= pc;
              end
              OP_JMP:  pc <= pc_rel;
              OP_BZ:   if (head0 == '0) pc <= pc_rel;
              OP_LOOPBEGIN: begin
                if (in_loop) begin
                  state <= S_ERR;
                end else if (!($signed(head0) < $signed(head1))) begin
                  state <= S_SKIP;
                end else begin
                  idx        <= head0;
                  lmax       <= head1;
                  lstep      <= (ins.imm == '0) ? DW'(1) : DW'(ins.imm);
                  body_pc    <= pc + 1'b1;
                  in_loop    <= 1'b1;
                  first_iter <= 1'b1;
                  compiling  <= spatial_en;
                end
              end
              OP_LOOPEND: begin
                if (!in_loop) begin
                  state <= S_ERR;
                end else if (first_iter && compiling) begin
                  nidx  <= next_idx;
                  pc    <= pc;
                  state <= S_FINISH;
                end else begin
                  idx        <= next_idx;
                  first_iter <= 1'b0;
                  if ($signed(next_idx) < $signed(lmax)) pc <= body_pc;
                  else in_loop <= 1'b0;
                end
              end
              default: ;
            endcase
          end
        end
        S_SKIP: begin
          pc <= pc + 1'b1;
          if (ins.op == OP_LOOPEND) state <= S_RUN;
        end
        S_FINISH: begin
          first_iter <= 1'b0;
          compiling  <= 1'b0;
          if (sp_start) begin
            state <= S_SPATIAL;
          end else begin
            state <= S_RUN;
            idx   <= nidx;
            if ($signed(nidx) < $signed(lmax)) pc <= body_pc;
            else begin
              in_loop <= 1'b0;
              pc      <= pc + 1'b1;
            end
          end
        end
        S_SPATIAL: begin
          if (sp_done) begin
            state   <= S_RUN;
            in_loop <= 1'b0;
            pc      <= pc + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
