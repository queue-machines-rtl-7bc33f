// tb_qm_spatial_engine: a 4 x 2 fabric configured by hand, as the placer
// would, for three loops: C[64+i] = A[i] + B[32+i] over three rows; a
// four-row loop with dup_2, a table lookup, swap and an unkept result, run
// with step 3; and B[32+i] - A[i] through a swap. Then two seven-row loops on
// the four physical rows, which need row virtualization: 4 * A[i] through a
// chain of dup_2/add, and 2 * (B[32+i] - A[i]) through swap/sub/dup/add. Memory is a
// model kept here with one port per unit. Checks results, the first index
// left after the loop, and the timing: the engine is busy for N + R cycles
// after the start cycle and done marks the last of them, N + R - 1 clock
// edges after the edge that samples start. Last, two loops with rows wider
// than the two physical columns (width virtualization), one of them also
// deeper than the four physical rows; each step then takes M micro-cycles.
module tb_qm_spatial_engine;
  import qm_pkg::*;
  localparam int ROWS = 4, COLS = 2, VROWS = 16, AW = 8, NFU = ROWS*COLS;

  logic clk = 1'b0, rst_n = 1'b0, cfg_clear = 1'b0, cfg_we = 1'b0, start = 1'b0;
  logic [7:0] cfg_row = '0, cfg_col = '0, rows_used = '0;
  cfg_t cfg_wdata = '0;
  logic [DW-1:0] first = '0, last = '0, step = '0, end_idx;
  logic busy, done;
  logic [AW-1:0] mem_addr [NFU];
  logic mem_we [NFU];
  logic [DW-1:0] mem_wdata [NFU], mem_rdata [NFU];
  logic [5:0] lut_addr [NFU];
  logic [DW-1:0] lut_rdata [NFU];

  qm_spatial_engine #(.ROWS(ROWS), .COLS(COLS), .VROWS(VROWS), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  logic [DW-1:0] mem [2**AW];
  always_comb for (int p = 0; p < NFU; p++) begin
    mem_rdata[p] = mem[mem_addr[p]];
    lut_rdata[p] = DW'(lut_addr[p]) * 3;
  end
  always @(posedge clk) for (int p = 0; p < NFU; p++) if (mem_we[p]) mem[mem_addr[p]] <= mem_wdata[p];

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

  task automatic put(input int r, input int c, input opcode_e op, input int nout, input int imm,
                     input int inb, input int outb);
    @(negedge clk);
    cfg_we = 1'b1; cfg_row = 8'(r); cfg_col = 8'(c);
    cfg_wdata.valid = 1'b1; cfg_wdata.ins = mk(op, 2'(nout), 9'(imm));
    cfg_wdata.in_base = slot_t'(inb); cfg_wdata.out_base = slot_t'(outb);
    @(negedge clk); cfg_we = 1'b0;
  endtask

  task automatic clear_cfg();
    @(negedge clk); cfg_clear = 1'b1;
    @(negedge clk); cfg_clear = 1'b0;
  endtask

  task automatic go(input int f, input int l, input int s, input int rows, output int lat);
    int t;
    @(negedge clk);
    start = 1'b1; first = DW'(f); last = DW'(l); step = DW'(s); rows_used = 8'(rows);
    @(posedge clk); #1 start = 1'b0;
    t = 0;
    while (!done) begin @(posedge clk); #1 t++; end
    lat = t;
    @(negedge clk);
    @(negedge clk);
  endtask

  logic [DW-1:0] init [2**AW];
  int lat, n;

  initial begin
    for (int a = 0; a < 2**AW; a++) begin init[a] = DW'($urandom); mem[a] = init[a]; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // C[64+i] = A[i] + B[32+i]
    clear_cfg();
    put(0, 0, OP_LD, 1, 0, 0, 0);
    put(0, 1, OP_LD, 1, 32, 0, 1);
    put(1, 0, OP_ADD, 1, 0, 0, 0);
    put(2, 0, OP_ST, 0, 64, 0, 0);
    go(2, 12, 1, 3, lat);
    n = 10;
    check(lat == n + 3 - 1, $sformatf("latency %0d, expected N+R-1 = %0d", lat, n + 2));
    check(end_idx == 16'd12, "end index after unit-step loop");
    for (int i = 0; i < 32; i++)
      check(mem[64+i] == ((i >= 2 && i < 12) ? init[i] + init[32+i] : init[64+i]),
            $sformatf("add loop word %0d", i));
    check(!busy, "idle after done");

    // D[128+i] = (B[32+i] - A[i]) via swap, and E[160+i] = lut(A[i]) ; step 3
    clear_cfg();
    put(0, 0, OP_LD, 1, 0, 0, 0);
    put(0, 1, OP_LD, 1, 32, 0, 1);
    put(1, 0, OP_DUP, 2, 0, 0, 0);     // A, A
    put(1, 1, OP_DUP, 1, 0, 1, 2);     // B
    put(2, 0, OP_LUT, 1, 0, 0, 0);     // lut(A)
    put(2, 1, OP_SWAP, 0, 0, 1, 1);    // (A, B) -> B, A
    put(3, 0, OP_ST, 0, 160, 0, 0);
    put(3, 1, OP_SUB, 0, 0, 1, 0);     // B - A, no copies kept
    go(0, 10, 3, 4, lat);
    check(lat == 4 + 4 - 1, $sformatf("latency %0d, expected 7", lat));
    check(end_idx == 16'd12, "end index after step-3 loop");
    for (int i = 0; i < 12; i++)
      check(mem[160+i] == ((i % 3 == 0) ? DW'(init[i][5:0]) * 3 : init[160+i]), $sformatf("lookup word %0d", i));
    // the sub result is not stored; replace st with the sub chain check via a last run
    clear_cfg();
    put(0, 0, OP_LD, 1, 0, 0, 0);
    put(0, 1, OP_LD, 1, 32, 0, 1);
    put(1, 0, OP_SWAP, 0, 0, 0, 0);    // -> B, A
    put(2, 0, OP_SUB, 1, 0, 0, 0);     // B - A
    put(3, 0, OP_ST, 0, 192, 0, 0);
    go(0, 5, 1, 4, lat);
    check(lat == 5 + 4 - 1, $sformatf("latency %0d, expected 8", lat));
    for (int i = 0; i < 5; i++) check(mem[192+i] == init[32+i] - init[i], $sformatf("swap-sub word %0d", i));
    for (int i = 5; i < 8; i++) check(mem[192+i] == init[192+i], "no store past the bound");

    // virtualized: seven virtual rows on four physical rows, 3 iterations per group
    clear_cfg();
    put(0, 0, OP_LD, 2, 0, 0, 0);      // A, A
    put(1, 0, OP_ADD, 1, 0, 0, 0);     // 2A
    put(2, 0, OP_DUP, 2, 0, 0, 0);
    put(3, 0, OP_ADD, 1, 0, 0, 0);     // 4A
    put(4, 0, OP_DUP, 1, 0, 0, 0);
    put(5, 0, OP_DUP, 1, 0, 0, 0);
    put(6, 0, OP_ST, 0, 64, 0, 0);
    for (int a = 0; a < 2**AW; a++) mem[a] = init[a];
    go(0, 10, 1, 7, lat);              // N = 10: K = 4 groups, d = 0
    check(lat == 7*4 + 0 + 1, $sformatf("virtualized latency %0d, expected 29", lat));
    check(end_idx == 16'd10, "end index, virtualized");
    for (int i = 0; i < 12; i++)
      check(mem[64+i] == ((i < 10) ? DW'(init[i] * 4) : init[64+i]), $sformatf("virtualized chain word %0d", i));

    clear_cfg();
    put(0, 0, OP_LD, 1, 0, 0, 0);
    put(0, 1, OP_LD, 1, 32, 0, 1);
    put(1, 0, OP_SWAP, 0, 0, 0, 0);    // B, A
    put(2, 0, OP_SUB, 1, 0, 0, 0);     // B - A
    put(3, 0, OP_DUP, 1, 0, 0, 0);
    put(4, 0, OP_DUP, 2, 0, 0, 0);
    put(5, 0, OP_ADD, 1, 0, 0, 0);
    put(6, 0, OP_ST, 0, 96, 0, 0);
    go(3, 8, 1, 7, lat);               // N = 5: K = 2 groups, d = 1
    check(lat == 7*2 + 1 + 1, $sformatf("virtualized latency %0d, expected 16", lat));
    for (int i = 0; i < 10; i++)
      check(mem[96+i] == ((i >= 3 && i < 8) ? DW'((init[32+i] - init[i]) * 2) : init[96+i]),
            $sformatf("virtualized swap word %0d", i));

    // width virtualization: a five-wide row on two-unit rows, M = 3
    // micro-cycles per step; busy lasts M*(N+R-1)+1 cycles
    clear_cfg();
    put(0, 0, OP_LD, 1, 0, 0, 0);      // X0
    put(0, 1, OP_LD, 1, 16, 0, 1);     // X1
    put(0, 2, OP_LD, 1, 32, 0, 2);     // X2
    put(0, 3, OP_LD, 1, 48, 0, 3);     // X3
    put(0, 4, OP_LD, 1, 64, 0, 4);     // X4
    put(1, 0, OP_ADD, 1, 0, 0, 0);     // X0 + X1
    put(1, 1, OP_SUB, 1, 0, 2, 1);     // X2 - X3
    put(1, 2, OP_DUP, 2, 0, 4, 2);     // X4, X4
    put(2, 0, OP_ST, 0, 128, 0, 0);
    put(2, 1, OP_ST, 0, 144, 1, 0);
    put(2, 2, OP_ADD, 1, 0, 2, 0);     // 2 X4
    put(3, 0, OP_ST, 0, 160, 0, 0);
    for (int a = 0; a < 2**AW; a++) mem[a] = init[a];
    go(0, 8, 1, 4, lat);
    check(lat == 3 * (8 + 4 - 1), $sformatf("wide-row latency %0d, expected 33", lat));
    check(end_idx == 16'd8, "end index, wide rows");
    for (int i = 0; i < 10; i++) begin
      check(mem[128+i] == ((i < 8) ? DW'(init[i] + init[16+i]) : init[128+i]), $sformatf("wide add word %0d", i));
      check(mem[144+i] == ((i < 8) ? DW'(init[32+i] - init[48+i]) : init[144+i]), $sformatf("wide sub word %0d", i));
      check(mem[160+i] == ((i < 8) ? DW'(init[64+i] * 2) : init[160+i]), $sformatf("wide dup word %0d", i));
    end

    // both virtualizations: seven virtual rows on four physical rows, three
    // columns wide on two units (M = 2)
    clear_cfg();
    put(0, 0, OP_LD, 2, 0, 0, 0);      // A, A
    put(0, 1, OP_LD, 1, 32, 0, 2);     // B
    put(0, 2, OP_LD, 1, 64, 0, 3);     // C
    put(1, 0, OP_ADD, 1, 0, 0, 0);     // 2A
    put(1, 1, OP_ADD, 1, 0, 2, 1);     // B + C
    put(2, 0, OP_DUP, 2, 0, 0, 0);
    put(2, 1, OP_DUP, 1, 0, 1, 2);
    put(3, 0, OP_ADD, 1, 0, 0, 0);     // 4A
    put(3, 1, OP_DUP, 1, 0, 2, 1);
    put(4, 0, OP_DUP, 1, 0, 0, 0);
    put(4, 1, OP_DUP, 1, 0, 1, 1);
    put(5, 0, OP_DUP, 1, 0, 0, 0);
    put(5, 1, OP_DUP, 1, 0, 1, 1);
    put(6, 0, OP_ST, 0, 128, 0, 0);
    put(6, 1, OP_ST, 0, 160, 1, 0);
    for (int a = 0; a < 2**AW; a++) mem[a] = init[a];
    go(0, 10, 1, 7, lat);              // N = 10: K = 4, d = 0
    check(lat == 2 * (7*4 + 0 + 1), $sformatf("wide virtualized latency %0d, expected 58", lat));
    for (int i = 0; i < 12; i++) begin
      check(mem[128+i] == ((i < 10) ? DW'(init[i] * 4) : init[128+i]), $sformatf("wide virtualized 4A word %0d", i));
      check(mem[160+i] == ((i < 10) ? DW'(init[32+i] + init[64+i]) : init[160+i]), $sformatf("wide virtualized B+C word %0d", i));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
