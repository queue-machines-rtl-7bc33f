// tb_qm_row_placer: feeds the placer the 18-instruction compressed
// leveled-planar example (op0..op3 loads, then dup/swap/operations over five
// rows) and checks every instruction's row and column against the hand
// placement of that example, its operand routing (in_base/out_base, worked
// out by hand from the queue order), the this_q/next_q counters after every
// instruction, and the result. Then checks each rejection rule.
module tb_qm_row_placer;
  import qm_pkg::*;
  localparam int ROWS = 8, COLS = 8;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, q_empty = 1'b1, trace_valid = 1'b0, finish = 1'b0;
  instr_t trace_ins = '0;
  logic cfg_clear, cfg_we, done, ok, abort_ctrl, abort_size;
  logic [7:0] cfg_row, cfg_col, rows_used;
  cfg_t cfg;

  qm_row_placer #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { opcode_e op; int nout; int row; int col; int inb; int outb; int tq; int nq; } step_t;
  // op4 add, op5_2 mul, op6_2 sub, op7_2 xor, op8..op10 two-input results with no copies
  step_t ex [18] = '{
    '{OP_LD,   1, 0, 0, 0, 0, 0, 1}, '{OP_LD,   1, 0, 1, 0, 1, 0, 2},
    '{OP_LD,   2, 0, 2, 0, 2, 0, 4}, '{OP_LD,   2, 0, 3, 0, 4, 0, 6},
    '{OP_DUP,  1, 1, 0, 0, 0, 5, 1}, '{OP_ADD,  1, 1, 1, 1, 1, 3, 2},
    '{OP_MUL,  2, 1, 2, 3, 2, 1, 4}, '{OP_DUP,  1, 1, 3, 5, 4, 0, 5},
    '{OP_DUP,  2, 2, 0, 0, 0, 4, 2}, '{OP_SWAP, 0, 2, 1, 1, 2, 2, 4},
    '{OP_XOR,  2, 2, 2, 3, 4, 0, 6}, '{OP_DUP,  1, 3, 0, 0, 0, 5, 1},
    '{OP_SUB,  2, 3, 1, 1, 1, 3, 3}, '{OP_SWAP, 0, 3, 2, 3, 3, 1, 5},
    '{OP_DUP,  1, 3, 3, 5, 5, 0, 6}, '{OP_ADD,  0, 4, 0, 0, 0, 4, 0},
    '{OP_SUB,  0, 4, 1, 2, 0, 2, 0}, '{OP_AND,  0, 4, 2, 4, 0, 0, 0}
  };

  task automatic begin_body(input bit qe);
    @(negedge clk); start = 1'b1; q_empty = qe;
    @(negedge clk); start = 1'b0; q_empty = 1'b1;
  endtask

  task automatic feed(input instr_t i);
    trace_valid = 1'b1; trace_ins = i;
    @(negedge clk); trace_valid = 1'b0;
  endtask

  task automatic end_body(output bit r_ok, output int r_rows);
    finish = 1'b1;
    @(negedge clk); finish = 1'b0;
    check(done, "done pulses one cycle after finish");
    r_ok = ok; r_rows = int'(rows_used);
  endtask

  bit r_ok; int r_rows;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // the worked example
    begin_body(1'b1);
    foreach (ex[k]) begin
      trace_valid = 1'b1; trace_ins = mk(ex[k].op, 2'(ex[k].nout), 9'd0);
      #1;
      check(cfg_we, $sformatf("step %0d configures a unit", k));
      check(int'(cfg_row) == ex[k].row && int'(cfg_col) == ex[k].col,
            $sformatf("step %0d placed at (%0d,%0d), expected (%0d,%0d)", k, cfg_row, cfg_col, ex[k].row, ex[k].col));
      check(int'(cfg.in_base) == ex[k].inb && int'(cfg.out_base) == ex[k].outb,
            $sformatf("step %0d routing in %0d out %0d", k, cfg.in_base, cfg.out_base));
      @(negedge clk); trace_valid = 1'b0;
      check(int'(dut.this_q) == ex[k].tq && int'(dut.next_q) == ex[k].nq,
            $sformatf("step %0d this_q=%0d next_q=%0d, expected %0d %0d", k, dut.this_q, dut.next_q, ex[k].tq, ex[k].nq));
    end
    end_body(r_ok, r_rows);
    check(r_ok && r_rows == 5, $sformatf("example accepted with 5 rows (ok=%0d rows=%0d)", r_ok, r_rows));

    // control flow in the body
    begin_body(1'b1);
    feed(mk(OP_IDX, 1, 0)); feed(mk(OP_BZ, 0, 1));
    end_body(r_ok, r_rows);
    check(!r_ok && abort_ctrl, "branch in body rejected as control flow");

    // nine units in one row
    begin_body(1'b1);
    for (int k = 0; k < 9; k++) feed(mk(OP_NOP, 0, 0));
    end_body(r_ok, r_rows);
    check(!r_ok && abort_size, "nine columns rejected as too wide");

    // nine rows
    begin_body(1'b1);
    feed(mk(OP_LD, 1, 0));
    for (int k = 0; k < 7; k++) feed(mk(OP_DUP, 1, 0));
    feed(mk(OP_ST, 0, 0));
    end_body(r_ok, r_rows);
    check(!r_ok && abort_size, "nine rows rejected as too deep");

    // exactly eight rows fit
    begin_body(1'b1);
    feed(mk(OP_LD, 1, 0));
    for (int k = 0; k < 6; k++) feed(mk(OP_DUP, 1, 0));
    feed(mk(OP_ST, 0, 0));
    end_body(r_ok, r_rows);
    check(r_ok && r_rows == 8, "eight rows accepted");

    // an operand from before the loop
    begin_body(1'b1);
    feed(mk(OP_ST, 0, 0));
    end_body(r_ok, r_rows);
    check(!r_ok, "reading an operand not produced in the body rejected");

    // operands left over
    begin_body(1'b1);
    feed(mk(OP_LD, 2, 0)); feed(mk(OP_ST, 0, 0));
    end_body(r_ok, r_rows);
    check(!r_ok, "left-over operand rejected");

    // queue not empty at loop entry
    begin_body(1'b0);
    feed(mk(OP_LD, 1, 0)); feed(mk(OP_ST, 0, 0));
    end_body(r_ok, r_rows);
    check(!r_ok, "non-empty queue at loop entry rejected");

    // same body with an empty queue is fine
    begin_body(1'b1);
    feed(mk(OP_LD, 1, 0)); feed(mk(OP_ST, 0, 0));
    end_body(r_ok, r_rows);
    check(r_ok && r_rows == 2, "load-store body accepted with 2 rows");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
