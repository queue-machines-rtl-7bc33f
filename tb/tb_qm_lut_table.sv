// tb_qm_lut_table: fills the 64-entry table and reads it back on every port.
module tb_qm_lut_table;
  import qm_pkg::*;
  localparam int NRD = 5;

  logic clk = 1'b0, we = 1'b0;
  logic [5:0] waddr = '0;
  logic [DW-1:0] wdata = '0;
  logic [5:0] raddr [NRD];
  logic [DW-1:0] rdata [NRD];

  qm_lut_table #(.NRD(NRD)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DW-1:0] img [64];

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (raddr[p]) raddr[p] = '0;
    for (int k = 0; k < 64; k++) begin
      img[k] = DW'($urandom);
      @(negedge clk); we = 1'b1; waddr = 6'(k); wdata = img[k];
    end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 200; n++) begin
      foreach (raddr[p]) raddr[p] = 6'($urandom);
      #1;
      foreach (raddr[p]) begin
        checks++;
        if (rdata[p] !== img[raddr[p]]) begin
          failures++; $display("FAIL: port %0d addr %0d", p, raddr[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
