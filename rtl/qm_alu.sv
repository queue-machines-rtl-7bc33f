// qm_alu: the operation of one queue instruction.
//
// Combinational. Given the instruction, the first operand a (read first from
// the queue head) and the second operand b, it produces res0 and, for swap,
// res1 (swap reads x then y and writes y then x, so res0 = b, res1 = a). For a
// load or store it forms the address idx + imm (the loop index plus the
// zero-extended immediate; ldi pushes the sign-extended immediate), and takes the loaded word from mem_rdata. For the
// 6-bit table lookup it drives lut_addr = a[5:0] and returns lut_rdata.
// Both the serial engine and every fabric functional unit use this block.
// The operation list follows the document; the address rule and the signed
// compare are this design's choices.
module qm_alu
  import qm_pkg::*;
#(
  parameter int AW = 10
) (
  input  instr_t          ins,
  input  logic [DW-1:0]   a,
  input  logic [DW-1:0]   b,
  input  logic [DW-1:0]   idx,
  input  logic [DW-1:0]   mem_rdata,
  input  logic [DW-1:0]   lut_rdata,
  output logic [DW-1:0]   res0,
  output logic [DW-1:0]   res1,
  output logic [AW-1:0]   mem_addr,
  output logic            mem_st,      // instruction is a store
  output logic [DW-1:0]   mem_wdata,
  output logic [5:0]      lut_addr
);
  logic [DW-1:0] simm;
  logic [DW-1:0] ea;

  assign simm      = DW'(signed'(ins.imm));
  assign ea        = idx + DW'(ins.imm);
  assign mem_addr  = ea[AW-1:0];
  assign mem_st    = (ins.op == OP_ST);
  assign mem_wdata = a;
  assign lut_addr  = a[5:0];

  always_comb begin
    res1 = a;
    unique case (ins.op)
      OP_DUP:  res0 = a;
      OP_SWAP: res0 = b;
      OP_ADD:  res0 = a + b;
      OP_SUB:  res0 = a - b;
      OP_MUL:  res0 = a * {{(DW-4){1'b0}}, b[3:0]};
      OP_LUT:  res0 = lut_rdata;
      OP_AND:  res0 = a & b;
      OP_OR:   res0 = a | b;
      OP_XOR:  res0 = a ^ b;
      OP_LT:   res0 = ($signed(a) < $signed(b)) ? DW'(1) : DW'(0);
      OP_LD:   res0 = mem_rdata;
      OP_LDI:  res0 = simm;
      OP_IDX:  res0 = idx;
      default: res0 = '0;
    endcase
  end
endmodule
