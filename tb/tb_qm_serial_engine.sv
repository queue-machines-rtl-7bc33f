// tb_qm_serial_engine: the serial engine with memories and stand-ins for the
// compilation and spatial engines kept here. One program (arithmetic, a
// four-iteration loop, a zero-trip loop, taken and untaken branches, a table
// lookup) runs three ways: with spatial_en low (fully serial); with the
// stand-in placer accepting the loop, where the engine must stream the first
// iteration, hand the other three to the stand-in fabric with the right bounds
// and resume after it; and with the placer rejecting it. A last program
// underflows the queue.
module tb_qm_serial_engine;
  import qm_pkg::*;
  localparam int IAW = 6, AW = 6;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, spatial_en = 1'b0;
  logic [IAW-1:0] imem_addr;
  instr_t imem_data;
  logic [AW-1:0] mem_addr;
  logic mem_we;
  logic [DW-1:0] mem_wdata, mem_rdata, lut_rdata;
  logic [5:0] lut_addr;
  logic pl_start, pl_q_empty, pl_trace_valid, pl_finish, pl_ok = 1'b0;
  instr_t pl_trace_ins;
  logic [7:0] pl_rows = 8'd3, sp_rows;
  logic sp_start, sp_done = 1'b0;
  logic [DW-1:0] sp_first, sp_last, sp_step;
  logic running, halted, error;

  qm_serial_engine #(.QDEPTH(16), .IAW(IAW), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  instr_t imem [2**IAW];
  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] lut [64];
  assign imem_data = imem[imem_addr];
  assign mem_rdata = mem[mem_addr];
  assign lut_rdata = lut[lut_addr];
  always @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in placer and fabric
  int n_start, n_trace, n_finish, n_sp;
  logic [DW-1:0] got_first, got_last, got_step;
  always @(posedge clk) begin
    if (pl_start) begin n_start++; check(pl_q_empty, "queue empty at loop entry"); end
    if (pl_trace_valid) n_trace++;
    if (pl_finish) n_finish++;
  end
  initial forever begin
    @(posedge clk);
    if (sp_start) begin
      n_sp++; got_first = sp_first; got_last = sp_last; got_step = sp_step;
      repeat (5) @(posedge clk);
      #1 sp_done = 1'b1;
      @(posedge clk); #1 sp_done = 1'b0;
    end
  end

  int pc;
  function automatic void emit(opcode_e op, int nout = 1, int imm = 0);
    imem[pc] = mk(op, 2'(nout), 9'(imm)); pc++;
  endfunction

  task automatic run(input bit sp, input bit ok);
    for (int a = 0; a < 2**AW; a++) mem[a] = 16'hdead;
    n_start = 0; n_trace = 0; n_finish = 0; n_sp = 0;
    @(negedge clk); spatial_en = sp; pl_ok = ok; start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!halted && !error) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < 64; k++) lut[k] = DW'($urandom);
    pc = 0;
    emit(OP_LDI, 1, 7); emit(OP_LDI, 1, -3); emit(OP_SUB, 2); emit(OP_ST, 0, 0);  // 10, 10
    emit(OP_LDI, 1, 2); emit(OP_MUL); emit(OP_ST, 0, 1);                         // 20
    emit(OP_LDI, 1, 0); emit(OP_LDI, 1, 4); emit(OP_LOOPBEGIN, 0, 1);
    emit(OP_IDX, 2); emit(OP_MUL); emit(OP_ST, 0, 10); emit(OP_LOOPEND);         // i*i
    emit(OP_IDX); emit(OP_ST, 0, 4);                                             // index outside a loop
    emit(OP_LDI, 1, 3); emit(OP_LDI, 1, 3); emit(OP_LOOPBEGIN, 0, 1);
    emit(OP_IDX); emit(OP_ST, 0, 20); emit(OP_LOOPEND);                          // never runs
    emit(OP_LDI, 1, 0); emit(OP_BZ, 0, 2); emit(OP_HALT, 0);                     // taken
    emit(OP_LDI, 1, 5); emit(OP_LUT); emit(OP_ST, 0, 2);
    emit(OP_LDI, 1, 1); emit(OP_LDI, 1, 2); emit(OP_LT); emit(OP_BZ, 0, 2);      // not taken
    emit(OP_LDI, 1, 9); emit(OP_ST, 0, 3); emit(OP_HALT, 0);

    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int mode = 0; mode < 3; mode++) begin
      run(mode != 0, mode == 1);
      check(halted && !error, $sformatf("mode %0d halts", mode));
      check(mem[0] == 16'd10 && mem[1] == 16'd20, "arithmetic");
      check(mem[2] == lut[5], "table lookup");
      check(mem[3] == 16'd9, "untaken branch falls through");
      check(mem[20] == 16'hdead, "zero-trip loop skipped");
      check(mem[4] == 16'd0, "index reads zero outside a loop");
      check(mem[10] == 16'd0, "first iteration runs serially");
      if (mode == 1) begin
        check(n_start == 1 && n_finish == 1 && n_trace == 3, $sformatf("first iteration streamed (%0d %0d %0d)", n_start, n_finish, n_trace));
        check(n_sp == 1 && got_first == 16'd1 && got_last == 16'd4 && got_step == 16'd1, "hand-off bounds");
        for (int i = 1; i < 4; i++) check(mem[10+i] == 16'hdead, "handed-off iterations not run serially");
      end else begin
        check(n_sp == 0, "no hand-off");
        check(n_start == (mode == 2 ? 1 : 0), "placer started only with spatial_en");
        for (int i = 1; i < 4; i++) check(mem[10+i] == DW'(i*i), $sformatf("serial iteration %0d", i));
      end
    end

    // queue underflow
    pc = 0;
    emit(OP_LDI, 1, 1); emit(OP_ADD); emit(OP_HALT, 0);
    run(1'b0, 1'b0);
    check(error && !halted, "underflow stops with error");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
