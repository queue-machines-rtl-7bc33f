// tb_qm_alu: random operands through every queue instruction of qm_alu,
// checked against results computed here, plus the operand counts of qm_pkg.
module tb_qm_alu;
  import qm_pkg::*;
  localparam int AW = 10;

  instr_t ins;
  logic [DW-1:0] a, b, idx, mem_rdata, lut_rdata, res0, res1, mem_wdata;
  logic [AW-1:0] mem_addr;
  logic mem_st;
  logic [5:0] lut_addr;

  qm_alu #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] model(opcode_e op, logic [DW-1:0] x, logic [DW-1:0] y,
                                         logic [8:0] imm, logic [DW-1:0] i,
                                         logic [DW-1:0] m, logic [DW-1:0] t);
    case (op)
      OP_DUP:  return x;
      OP_SWAP: return y;
      OP_ADD:  return DW'(int'(x) + int'(y));
      OP_SUB:  return DW'(int'(x) - int'(y));
      OP_MUL:  return DW'(int'(x) * int'(y % 16));
      OP_LUT:  return t;
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      OP_XOR:  return x ^ y;
      OP_LT:   return (int'($signed(x)) < int'($signed(y))) ? 16'd1 : 16'd0;
      OP_LD:   return m;
      OP_LDI:  return imm[8] ? DW'(int'(imm) - 512) : DW'(imm);
      OP_IDX:  return i;
      default: return '0;
    endcase
  endfunction

  opcode_e ops [13] = '{OP_DUP, OP_SWAP, OP_ADD, OP_SUB, OP_MUL, OP_LUT, OP_AND, OP_OR,
                        OP_XOR, OP_LT, OP_LD, OP_LDI, OP_IDX};

  initial begin
    for (int n = 0; n < 2000; n++) begin
      ins = mk(ops[n % 13], 2'($urandom), 9'($urandom));
      a = DW'($urandom); b = DW'($urandom); idx = DW'($urandom % 600);
      mem_rdata = DW'($urandom); lut_rdata = DW'($urandom);
      if (n % 7 == 0) b = a;                      // equal operands for lt
      #1;
      check(res0 == model(ins.op, a, b, ins.imm, idx, mem_rdata, lut_rdata),
            $sformatf("%s a=%h b=%h res0=%h", ins.op.name(), a, b, res0));
      if (ins.op == OP_SWAP) check(res1 == a, "swap second result");
      check(mem_addr == AW'(int'(idx) + int'(ins.imm)), "effective address");
      check(lut_addr == a[5:0], "lookup address");
    end
    // store
    ins = mk(OP_ST, 0, 9'd5); a = 16'h1234; idx = 16'd3; #1;
    check(mem_st && mem_wdata == 16'h1234 && mem_addr == 10'd8, "store");
    // operand counts (from the queue semantics)
    check(n_in(OP_SWAP) == 2 && n_out(mk(OP_SWAP, 0, 0)) == 2, "swap counts");
    check(n_in(OP_DUP) == 1 && n_out(mk(OP_DUP, 2, 0)) == 2, "dup_2 counts");
    check(n_in(OP_ST) == 1 && n_out(mk(OP_ST, 1, 0)) == 0, "store counts");
    check(n_in(OP_LD) == 0 && n_out(mk(OP_LD, 2, 0)) == 2, "ld_2 counts");
    check(n_in(OP_NOP) == 0 && n_out(mk(OP_NOP, 1, 0)) == 0, "nop counts");
    check(!loop_legal(OP_BZ) && !loop_legal(OP_LOOPBEGIN) && loop_legal(OP_NOP), "loop legality");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
