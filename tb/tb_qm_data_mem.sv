// tb_qm_data_mem: random writes and reads on all ports of the shared memory,
// including same-word writes where the lowest-numbered port must win.
module tb_qm_data_mem;
  import qm_pkg::*;
  localparam int AW = 5, NP = 4;

  logic clk = 1'b0;
  logic [AW-1:0] addr [NP];
  logic we [NP];
  logic [DW-1:0] wdata [NP];
  logic [DW-1:0] rdata [NP];

  qm_data_mem #(.AW(AW), .NP(NP)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_conflict = 0;
  logic [DW-1:0] ref_mem [2**AW];

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (addr[p]) begin addr[p] = '0; we[p] = 1'b0; wdata[p] = '0; end
    // fill through port 0
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); we[0] = 1'b1; addr[0] = AW'(a); wdata[0] = DW'($urandom); ref_mem[a] = wdata[0];
    end
    @(negedge clk); we[0] = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      foreach (addr[p]) begin
        addr[p] = AW'($urandom % 8); we[p] = ($urandom % 2) == 1; wdata[p] = DW'($urandom);
      end
      #1;
      foreach (addr[p]) begin
        checks++;
        if (rdata[p] !== ref_mem[addr[p]]) begin failures++; $display("FAIL: read port %0d", p); end
      end
      for (int p = NP-1; p >= 0; p--) if (we[p]) ref_mem[addr[p]] = wdata[p];
      for (int p = 0; p < NP; p++)
        for (int q = p+1; q < NP; q++)
          if (we[p] && we[q] && addr[p] == addr[q]) n_conflict++;
    end
    checks++;
    if (n_conflict == 0) begin failures++; $display("FAIL: no write conflict exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
