// tb_qm_fu: one functional unit. Results follow the operands within the
// cycle, stores reach the memory port only for a valid iteration, loads take
// the memory word at idx + offset, swap yields both operands exchanged.
module tb_qm_fu;
  import qm_pkg::*;
  localparam int AW = 10;

  logic clk = 1'b0;
  cfg_t cfg = '0;
  logic in_valid = 1'b0;
  logic [DW-1:0] idx = '0, a = '0, b = '0, mem_rdata = '0, lut_rdata = '0;
  logic [AW-1:0] mem_addr;
  logic mem_we;
  logic [DW-1:0] mem_wdata, res0, res1;
  logic [5:0] lut_addr;

  qm_fu #(.AW(AW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg.valid = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      a = DW'($urandom); b = DW'($urandom); idx = DW'($urandom % 100);
      mem_rdata = DW'($urandom); in_valid = 1'b1;
      case (n % 4)
        0: begin
          cfg.ins = mk(OP_ADD, 1, 0);
          #1 check(res0 == a + b, "add");
        end
        1: begin
          cfg.ins = mk(OP_SWAP, 0, 0);
          #1 check(res0 == b && res1 == a, "swap");
        end
        2: begin
          cfg.ins = mk(OP_LD, 1, 9'd40);
          #1 check(mem_addr == AW'(idx + 40) && !mem_we, "load address");
          #1 check(res0 == mem_rdata, "load result");
        end
        default: begin
          cfg.ins = mk(OP_ST, 0, 9'd7);
          #1 check(mem_we && mem_addr == AW'(idx + 7) && mem_wdata == a, "store");
          in_valid = 1'b0;
          #1 check(!mem_we, "no store without a valid iteration");
          cfg.ins = mk(OP_SUB, 1, 0);
          #1 check(res0 == a - b && !mem_we, "sub, no store");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
