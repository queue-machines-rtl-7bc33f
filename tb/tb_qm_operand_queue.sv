// tb_qm_operand_queue: random pops and pushes against a reference queue kept
// here, including underflow and overflow attempts that must leave the queue
// unchanged, and a wrap of the circular buffer many times over.
module tb_qm_operand_queue;
  import qm_pkg::*;
  localparam int DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [1:0] pop_n = '0, push_n = '0;
  logic [DW-1:0] push_d [MAXOUT];
  logic [DW-1:0] head0, head1;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic empty, overflow, underflow;

  qm_operand_queue #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_over = 0, n_under = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] q [$];

  initial begin
    foreach (push_d[k]) push_d[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      pop_n  = 2'($urandom % 3);
      push_n = 2'($urandom % 4);
      foreach (push_d[k]) push_d[k] = DW'($urandom);
      #1;
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(head0 == q[0], "head0");
      if (q.size() > 1) check(head1 == q[1], "head1");
      check(underflow == (int'(pop_n) > q.size()), "underflow flag");
      check(overflow == (!underflow && q.size() - int'(pop_n) + int'(push_n) > DEPTH), "overflow flag");
      if (underflow) n_under++;
      if (overflow) n_over++;
      if (!underflow && !overflow) begin
        for (int k = 0; k < int'(pop_n); k++) void'(q.pop_front());
        for (int k = 0; k < int'(push_n); k++) q.push_back(push_d[k]);
      end
    end
    @(negedge clk); pop_n = '0; push_n = '0; clear = 1'b1;
    @(negedge clk); clear = 1'b0; #1;
    check(empty && count == '0, "clear empties the queue");
    check(n_over > 0 && n_under > 0, "overflow and underflow were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
