// tb_qm_interconnect: two row pairs of the worked placement example with
// random data: four loads feeding dup/add/mul/dup, and a dup_2/swap/xor row
// feeding dup/sub/swap/dup. Operands expected by following the queue order.
module tb_qm_interconnect;
  import qm_pkg::*;
  localparam int COLS = 4;

  cfg_t up_cfg [COLS], dn_cfg [COLS];
  logic [DW-1:0] up_res0 [COLS], up_res1 [COLS], dn_a [COLS], dn_b [COLS];

  qm_interconnect #(.COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cfg_t c(opcode_e op, int nout, int inb, int outb);
    cfg_t r;
    r.valid = 1'b1; r.ins = mk(op, 2'(nout), 9'd0); r.in_base = slot_t'(inb); r.out_base = slot_t'(outb);
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 100; n++) begin
      foreach (up_res0[k]) begin up_res0[k] = DW'($urandom); up_res1[k] = DW'($urandom); end
      // loads -> dup, add, mul, dup
      up_cfg = '{c(OP_LD,1,0,0), c(OP_LD,1,0,1), c(OP_LD,2,0,2), c(OP_LD,2,0,4)};
      dn_cfg = '{c(OP_DUP,1,0,0), c(OP_ADD,1,1,1), c(OP_MUL,2,3,2), c(OP_DUP,1,5,4)};
      #1;
      check(dn_a[0] == up_res0[0], "dup <- op0");
      check(dn_a[1] == up_res0[1] && dn_b[1] == up_res0[2], "add <- op1, op2");
      check(dn_a[2] == up_res0[2] && dn_b[2] == up_res0[3], "mul <- op2, op3");
      check(dn_a[3] == up_res0[3], "dup <- op3");
      // dup_2, swap, xor_2 -> dup, sub, swap, dup
      up_cfg = '{c(OP_DUP,2,0,0), c(OP_SWAP,0,1,2), c(OP_XOR,2,3,4), '0};
      dn_cfg = '{c(OP_DUP,1,0,0), c(OP_SUB,2,1,1), c(OP_SWAP,0,3,3), c(OP_DUP,1,5,5)};
      #1;
      check(dn_a[0] == up_res0[0], "dup <- dup_2 first copy");
      check(dn_a[1] == up_res0[0] && dn_b[1] == up_res0[1], "sub <- dup_2 second copy, swap first");
      check(dn_a[2] == up_res1[1] && dn_b[2] == up_res0[2], "swap <- swap second, xor first");
      check(dn_a[3] == up_res0[2], "dup <- xor second copy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
