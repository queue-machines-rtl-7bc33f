// tb_qm_top: end-to-end test of the integrated queue machine at its default
// sizes (8 x 8 fabric, 64-entry queue).
//
// One program exercises every mechanism: branchy setup code run serially, the
// butterfly loop of the classic four-point example (loads, dup/swap operand
// routing, add/sub, stores) handed to the fabric, a loop with a branch that
// the compiler must reject, a loop wider than the physical fabric that runs
// with width virtualization, a loop too wide even for the virtual row width
// of 32 columns, a loop whose bounds
// skip it, a table-lookup loop and a six-row loop built from a leveled-planar
// graph with dup_2, swap, multiply and logic operations, and an eleven-row
// loop that only fits through row virtualization. The program runs
// twice, with and without the spatial engine; both final memories are checked
// word for word against values computed here from the loop formulas. The
// fabric's time per loop is checked against N + R cycles (N iterations left
// after the first, R rows), M*(N+R-1)+1 for the wide loop (M micro-cycles per
// step) and V*K + d + 2 for the row-virtualized loop. A second program
// overflows the operand queue.
module tb_qm_top;
  import qm_pkg::*;

  localparam int AW = 10, IAW = 10, MW = 512;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, spatial_en = 1'b0;
  logic imem_we = 1'b0, lut_we = 1'b0, hmem_we = 1'b0;
  logic [IAW-1:0] imem_waddr = '0;
  instr_t imem_wdata = '0;
  logic [5:0] lut_waddr = '0;
  logic [DW-1:0] lut_wdata = '0, hmem_wdata = '0, hmem_rdata;
  logic [AW-1:0] hmem_addr = '0;
  logic running, halted, error, spatial_active, handoff, compile_done, compile_ok;
  logic compile_abort_ctrl, compile_abort_size;

  qm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- program assembly ----------------
  instr_t prog [$];
  function automatic void emit(opcode_e op, int nout = 1, int imm = 0);
    prog.push_back(mk(op, 2'(nout), 9'(imm)));
  endfunction

  function automatic void build_main();
    prog.delete();
    // if (x > 10) x = 10; x = x * 4; mem[1] = x
    emit(OP_LDI, 1, 10); emit(OP_LD, 1, 0); emit(OP_LT);
    emit(OP_BZ, 0, 3); emit(OP_LDI, 1, 10); emit(OP_JMP, 0, 2);
    emit(OP_LD, 1, 0); emit(OP_LDI, 1, 4); emit(OP_MUL); emit(OP_ST, 0, 1);
    // for (i = 0; i < x; i += 4) butterfly, A at 16, B at 64
    emit(OP_LDI, 1, 0); emit(OP_LD, 1, 1); emit(OP_LOOPBEGIN, 0, 4);
    for (int k = 0; k < 4; k++) emit(OP_LD, 2, 16 + k);
    emit(OP_DUP); emit(OP_SWAP); emit(OP_DUP); emit(OP_DUP); emit(OP_SWAP); emit(OP_DUP);
    emit(OP_ADD, 2); emit(OP_SUB, 2); emit(OP_ADD, 2); emit(OP_SUB, 2);
    emit(OP_DUP); emit(OP_SWAP); emit(OP_SWAP); emit(OP_SWAP); emit(OP_DUP);
    emit(OP_DUP); emit(OP_DUP); emit(OP_SWAP); emit(OP_SWAP); emit(OP_DUP); emit(OP_DUP);
    emit(OP_DUP); emit(OP_SWAP); emit(OP_SWAP); emit(OP_SWAP); emit(OP_DUP);
    emit(OP_ADD); emit(OP_ADD); emit(OP_SUB); emit(OP_SUB);
    for (int k = 0; k < 4; k++) emit(OP_ST, 0, 64 + k);
    emit(OP_LOOPEND);
    // loop with a branch in its body: must stay serial
    emit(OP_LDI, 1, 0); emit(OP_LDI, 1, 3); emit(OP_LOOPBEGIN, 0, 1);
    emit(OP_IDX, 2); emit(OP_BZ, 0, 1); emit(OP_ST, 0, 300); emit(OP_LOOPEND);
    // loop with ten columns in its first row: wider than the 8 physical
    // columns, runs with width virtualization (2 micro-cycles per step)
    emit(OP_LDI, 1, 0); emit(OP_LDI, 1, 3); emit(OP_LOOPBEGIN, 0, 1);
    for (int k = 0; k < 9; k++) emit(OP_NOP, 0);
    emit(OP_IDX); emit(OP_ST, 0, 320); emit(OP_LOOPEND);
    // loop with 34 columns in its first row: too wide for 32 virtual columns
    emit(OP_LDI, 1, 0); emit(OP_LDI, 1, 3); emit(OP_LOOPBEGIN, 0, 1);
    for (int k = 0; k < 33; k++) emit(OP_NOP, 0);
    emit(OP_IDX); emit(OP_ST, 0, 324); emit(OP_LOOPEND);
    // loop that runs zero times
    emit(OP_LDI, 1, 5); emit(OP_LDI, 1, 5); emit(OP_LOOPBEGIN, 0, 1);
    emit(OP_IDX); emit(OP_ST, 0, 330); emit(OP_LOOPEND);
    // table lookup loop
    emit(OP_LDI, 1, 0); emit(OP_LDI, 1, 5); emit(OP_LOOPBEGIN, 0, 1);
    emit(OP_LD, 1, 400); emit(OP_LUT); emit(OP_ST, 0, 410); emit(OP_LOOPEND);
    // six-row leveled-planar loop
    emit(OP_LDI, 1, 0); emit(OP_LDI, 1, 7); emit(OP_LOOPBEGIN, 0, 1);
    emit(OP_LD, 1, 340); emit(OP_LD, 1, 350); emit(OP_LD, 2, 360); emit(OP_LD, 2, 370);
    emit(OP_DUP); emit(OP_ADD); emit(OP_MUL, 2); emit(OP_DUP);
    emit(OP_DUP, 2); emit(OP_SWAP); emit(OP_XOR, 2);
    emit(OP_DUP); emit(OP_SUB, 2); emit(OP_SWAP); emit(OP_DUP);
    emit(OP_ADD); emit(OP_SUB); emit(OP_AND);
    emit(OP_ST, 0, 440); emit(OP_ST, 0, 450); emit(OP_ST, 0, 460);
    emit(OP_LOOPEND);
    // eleven-row loop: deeper than the 8-row fabric, runs virtualized
    emit(OP_LDI, 1, 0); emit(OP_LDI, 1, 10); emit(OP_LOOPBEGIN, 0, 1);
    emit(OP_LD, 2, 480);
    for (int k = 0; k < 3; k++) begin emit(OP_ADD); emit(OP_DUP, 2); end
    emit(OP_ADD); emit(OP_DUP); emit(OP_DUP); emit(OP_ST, 0, 496);
    emit(OP_LOOPEND);
    emit(OP_HALT, 0);
  endfunction

  function automatic void build_overflow();
    prog.delete();
    for (int k = 0; k < 22; k++) emit(OP_LDI, 3, k);
    emit(OP_HALT, 0);
  endfunction

  // ---------------- host access ----------------
  logic [DW-1:0] init_mem [MW];
  logic [DW-1:0] lut_img  [64];
  logic [DW-1:0] got      [2][MW];

  task automatic load_prog();
    foreach (prog[k]) begin
      @(negedge clk); imem_we = 1'b1; imem_waddr = IAW'(k); imem_wdata = prog[k];
    end
    @(negedge clk); imem_we = 1'b0;
  endtask

  task automatic load_mem();
    for (int a = 0; a < MW; a++) begin
      @(negedge clk); hmem_we = 1'b1; hmem_addr = AW'(a); hmem_wdata = init_mem[a];
    end
    @(negedge clk); hmem_we = 1'b0;
  endtask

  task automatic read_mem(input int run);
    for (int a = 0; a < MW; a++) begin
      @(negedge clk); hmem_addr = AW'(a); #1 got[run][a] = hmem_rdata;
    end
  endtask

  // ---------------- mechanism monitors ----------------
  int n_handoff = 0, n_ok = 0, n_abort_ctrl = 0, n_abort_size = 0, n_skip = 0;
  int n_swap = 0, n_dup2 = 0, n_lut = 0, n_mul = 0, n_overflow = 0, n_serial_iter = 0;
  int busy_len [$];
  int busy_cnt = 0, n_virt = 0, n_wide = 0;
  always @(posedge clk) if (rst_n) begin
    if (handoff) n_handoff++;
    if (handoff && dut.sp_rows > 8'(dut.ROWS)) n_virt++;
    if (handoff && dut.u_spatial.wmax > 8'(dut.COLS)) n_wide++;
    if (compile_done && compile_ok) n_ok++;
    if (compile_done && !compile_ok && compile_abort_ctrl) n_abort_ctrl++;
    if (compile_done && !compile_ok && compile_abort_size) n_abort_size++;
    if (dut.u_serial.state == dut.u_serial.S_SKIP && dut.ins.op == OP_LOOPEND) n_skip++;
    if (dut.u_serial.exec) begin
      if (dut.ins.op == OP_SWAP) n_swap++;
      if (dut.ins.op == OP_DUP && dut.ins.nout == 2) n_dup2++;
      if (dut.ins.op == OP_LUT) n_lut++;
      if (dut.ins.op == OP_MUL) n_mul++;
      if (dut.ins.op == OP_LOOPEND) n_serial_iter++;
    end
    if (spatial_active) busy_cnt++;
    else if (busy_cnt != 0) begin busy_len.push_back(busy_cnt); busy_cnt = 0; end
  end

  task automatic run(input bit sp, output int cycles);
    int t0;
    @(negedge clk); spatial_en = sp; start = 1'b1;
    @(negedge clk); start = 1'b0;
    t0 = cycle;
    while (!halted && !error) @(negedge clk);
    cycles = cycle - t0;
  endtask

  // ---------------- reference ----------------
  logic [DW-1:0] exp_mem [MW];

  function automatic void reference();
    logic [DW-1:0] x, e, f, g, h, v0, v1, v2, v3, s4, m5, x7, d6;
    int xx;
    foreach (exp_mem[a]) exp_mem[a] = init_mem[a];
    x = init_mem[0];
    if ($signed(x) > 10) x = 10;
    x = x * 4;
    exp_mem[1] = x;
    xx = int'($signed(x));
    for (int i = 0; i < xx; i += 4) begin
      e = init_mem[16+i] + init_mem[17+i]; f = init_mem[16+i] - init_mem[17+i];
      g = init_mem[18+i] + init_mem[19+i]; h = init_mem[18+i] - init_mem[19+i];
      exp_mem[64+i] = e + g; exp_mem[65+i] = f + h;
      exp_mem[66+i] = e - g; exp_mem[67+i] = f - h;
    end
    for (int i = 0; i < 3; i++) exp_mem[300+i] = DW'(i);
    for (int i = 0; i < 3; i++) exp_mem[320+i] = DW'(i);
    for (int i = 0; i < 3; i++) exp_mem[324+i] = DW'(i);
    for (int i = 0; i < 5; i++) exp_mem[410+i] = lut_img[init_mem[400+i][5:0]];
    for (int i = 0; i < 7; i++) begin
      v0 = init_mem[340+i]; v1 = init_mem[350+i]; v2 = init_mem[360+i]; v3 = init_mem[370+i];
      s4 = v1 + v2; m5 = v2 * DW'(v3[3:0]); x7 = m5 ^ v3; d6 = v0 - m5;
      exp_mem[440+i] = v0 + d6; exp_mem[450+i] = d6 - x7; exp_mem[460+i] = s4 & x7;
    end
    for (int i = 0; i < 10; i++) exp_mem[496+i] = DW'(init_mem[480+i] * 16);
  endfunction

  int cyc_sp, cyc_ser, mism;

  initial begin
    for (int a = 0; a < MW; a++) init_mem[a] = DW'($urandom);
    init_mem[0] = DW'(13);                  // x > 10: clamped to 10, 10 iterations
    for (int k = 0; k < 64; k++) lut_img[k] = DW'($urandom);
    reference();

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk); lut_we = 1'b1; lut_waddr = 6'(k); lut_wdata = lut_img[k];
    end
    @(negedge clk); lut_we = 1'b0;
    build_main();
    load_prog();

    // run 1: spatial engine enabled
    load_mem();
    run(1'b1, cyc_sp);
    check(halted && !error, "main program halts without error (spatial)");
    read_mem(0);
    // run 2: serial only
    load_mem();
    run(1'b0, cyc_ser);
    check(halted && !error, "main program halts without error (serial)");
    read_mem(1);

    for (int r = 0; r < 2; r++) begin
      mism = 0;
      for (int a = 0; a < MW; a++)
        if (got[r][a] !== exp_mem[a]) begin
          if (mism < 8) $display("  run %0d mem[%0d] = %h, expected %h", r, a, got[r][a], exp_mem[a]);
          mism++;
        end
      check(mism == 0, $sformatf("run %0d final memory matches reference (%0d words differ)", r, mism));
    end
    $display("cycles: spatial %0d, serial only %0d", cyc_sp, cyc_ser);
    check(cyc_sp < cyc_ser, "spatial execution is faster than serial execution");

    // fabric occupancy per handed-off loop: N + R cycles
    check(busy_len.size() == 5, $sformatf("five loops ran on the fabric (%0d)", busy_len.size()));
    if (busy_len.size() == 5) begin
      check(busy_len[0] == 9 + 8, $sformatf("butterfly loop: %0d cycles, expected 17", busy_len[0]));
      // ten columns on 8 units: M = 2 micro-cycles per step, M*(N+R-1)+1
      check(busy_len[1] == 2*(2 + 2 - 1) + 1, $sformatf("wide loop: %0d cycles, expected 7", busy_len[1]));
      check(busy_len[2] == 4 + 3, $sformatf("lookup loop: %0d cycles, expected 7", busy_len[2]));
      check(busy_len[3] == 6 + 6, $sformatf("six-row loop: %0d cycles, expected 12", busy_len[3]));
      // virtualized: V = 11 rows, 9 iterations left in groups of P-1 = 7: K = 2, d = 1
      check(busy_len[4] == 11*2 + 1 + 2, $sformatf("eleven-row loop: %0d cycles, expected 25", busy_len[4]));
    end

    // queue overflow
    build_overflow();
    load_prog();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (40) @(negedge clk);
    if (error) n_overflow++;
    check(error && !halted, "queue overflow stops the machine with error");

    $display("mechanisms: virtualized=%0d wide=%0d handoff=%0d compiled=%0d abort_ctrl=%0d abort_size=%0d skip=%0d swap=%0d dup2=%0d lut=%0d mul=%0d overflow=%0d serial_loopend=%0d",
             n_virt, n_wide, n_handoff, n_ok, n_abort_ctrl, n_abort_size, n_skip, n_swap, n_dup2, n_lut, n_mul, n_overflow, n_serial_iter);
    check(n_handoff == 5, "handoff to the spatial engine happened 5 times");
    check(n_ok == 5, "five loop bodies compiled");
    check(n_virt == 1, "one loop ran with row virtualization");
    check(n_wide == 1, "one loop ran with width virtualization");
    check(n_abort_ctrl == 1, "control flow in a loop body rejected once");
    check(n_abort_size == 1, "oversized loop body rejected once");
    check(n_skip == 2, "zero-trip loop skipped in both runs");
    check(n_swap > 0, "swap executed");
    check(n_dup2 > 0, "dup_2 executed");
    check(n_lut > 0, "table lookup executed");
    check(n_mul > 0, "multiply executed");
    check(n_overflow == 1, "queue overflow seen");
    check(n_serial_iter > 0, "serial loop iterations executed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
