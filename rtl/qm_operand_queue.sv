// qm_operand_queue: the operand queue of the serial engine.
//
// A circular buffer of DEPTH words. Each cycle the engine may take up to two
// operands from the head (pop_n) and append up to three results at the tail
// (push_n, push_d[0] first). head0/head1 show the two oldest entries
// combinationally, so an instruction reads its operands and retires in one
// cycle. A pop of more entries than are held sets underflow; a push that
// would exceed DEPTH sets overflow and drops the whole push; in both cases the
// queue is left unchanged that cycle. Both flags are one-cycle pulses.
// clear empties the queue. The head/tail discipline follows the document; the
// depth, the per-cycle port counts and the error behaviour are this design's.
module qm_operand_queue
  import qm_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [1:0]           pop_n,
  input  logic [1:0]           push_n,
  input  logic [DW-1:0]        push_d [MAXOUT],
  output logic [DW-1:0]        head0,
  output logic [DW-1:0]        head1,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                 empty,
  output logic                 overflow,
  output logic                 underflow
);
  localparam int PW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH+1);

  logic [DW-1:0] mem [DEPTH];
  logic [PW-1:0] head;
  logic [CW:0]   after_pop;   // count after the pops, one bit wider

  function automatic logic [PW-1:0] wrap(input int unsigned p);
    return PW'(p % DEPTH);
  endfunction

  assign head0 = mem[head];
  assign head1 = mem[wrap(int'(head) + 1)];
  assign empty = (count == '0);

  always_comb begin
    after_pop = {1'b0, count} - (CW+1)'(pop_n);
    underflow = (CW+1)'(pop_n) > {1'b0, count};
    overflow  = !underflow && (after_pop + (CW+1)'(push_n) > (CW+1)'(DEPTH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      count <= '0;
    end else if (clear) begin
      head  <= '0;
      count <= '0;
    end else if (!underflow && !overflow) begin
      for (int k = 0; k < MAXOUT; k++)
        if (k < int'(push_n))
          mem[wrap(int'(head) + int'(count) + k)] <= push_d[k];
      head  <= wrap(int'(head) + int'(pop_n));
      count <= CW'(after_pop + (CW+1)'(push_n));
    end
  end
endmodule
