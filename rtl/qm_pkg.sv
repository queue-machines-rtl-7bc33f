// qm_pkg: shared types and constants of the queue machine.
//
// The queue machine reads the operands of an instruction from the head of an
// operand queue and appends its results to the tail. An instruction word
// carries no operand addresses; it carries an opcode, a copy count (how many
// copies of the result go to the tail, written as a subscript in assembly:
// op_2, dup_2, st_0) and a small immediate. The operation set follows the
// document: 16-bit add and subtract, a 16 x 4 bit multiply, a 6-bit table
// lookup, load, store, logical operations, dup, swap, nop, and the loop
// delimiters loopbegin/loopend. The exact bit encoding, the immediate, the
// compare, the branch/jump/halt instructions and the idx/ldi instructions are
// this design's own choices (the document gives no encoding).
//
// Instruction word, 16 bits: [15:11] opcode, [10:9] copy count, [8:0] imm.
// The fabric configuration word (cfg_t) is what the compilation engine writes
// for one functional unit: the instruction plus where its operands sit in the
// previous row's output list and where its results go in its own row's list.
package qm_pkg;

  parameter int DW     = 16;  // datapath width (16-bit add/sub in the document)
  parameter int MAXOUT = 3;   // largest copy count the 2-bit field can hold
  parameter int SLOTW  = 8;   // width of an operand-slot index in a row

  typedef enum logic [4:0] {
    OP_NOP       = 5'd0,   // fills a column, touches no operand
    OP_DUP       = 5'd1,   // head -> tail (copy count copies)
    OP_SWAP      = 5'd2,   // reads x then y, writes y then x
    OP_ADD       = 5'd3,
    OP_SUB       = 5'd4,   // first operand minus second
    OP_MUL       = 5'd5,   // 16 bit x low 4 bits of second operand
    OP_LUT       = 5'd6,   // 6-bit table lookup of the head operand
    OP_AND       = 5'd7,
    OP_OR        = 5'd8,
    OP_XOR       = 5'd9,
    OP_LT        = 5'd10,  // signed first < second -> 1 else 0
    OP_LD        = 5'd11,  // push mem[idx + imm], imm unsigned
    OP_ST        = 5'd12,  // mem[idx + imm] = head
    OP_LDI       = 5'd13,  // push sign-extended imm
    OP_IDX       = 5'd14,  // push the loop index
    OP_LOOPBEGIN = 5'd15,  // reads min then max, imm = step
    OP_LOOPEND   = 5'd16,
    OP_BZ        = 5'd17,  // pops one, branch pc+imm if zero
    OP_JMP       = 5'd18,  // pc + imm
    OP_HALT      = 5'd19
  } opcode_e;

  typedef struct packed {
    opcode_e    op;
    logic [1:0] nout;   // copy count of the result
    logic [8:0] imm;
  } instr_t;

  typedef logic [SLOTW-1:0] slot_t;

  typedef struct packed {
    logic   valid;
    instr_t ins;
    slot_t  in_base;   // first operand's position in the previous row's outputs
    slot_t  out_base;  // first result's position in this row's outputs
  } cfg_t;

  // Number of operands an instruction reads from the queue head.
  function automatic logic [1:0] n_in(opcode_e op);
    case (op)
      OP_DUP, OP_LUT, OP_ST, OP_BZ:                         return 2'd1;
      OP_SWAP, OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR,
      OP_XOR, OP_LT, OP_LOOPBEGIN:                          return 2'd2;
      default:                                              return 2'd0;
    endcase
  endfunction

  // Number of operands an instruction writes to the queue tail.
  function automatic logic [1:0] n_out(instr_t i);
    case (i.op)
      OP_SWAP:                                              return 2'd2;
      OP_DUP, OP_ADD, OP_SUB, OP_MUL, OP_LUT, OP_AND, OP_OR,
      OP_XOR, OP_LT, OP_LD, OP_LDI, OP_IDX:                 return i.nout;
      default:                                              return 2'd0;
    endcase
  endfunction

  // Instructions that may appear in a loop body mapped to the fabric.
  function automatic logic loop_legal(opcode_e op);
    case (op)
      OP_LOOPBEGIN, OP_LOOPEND, OP_BZ, OP_JMP, OP_HALT:     return 1'b0;
      default:                                              return 1'b1;
    endcase
  endfunction

  function automatic instr_t mk(opcode_e op, logic [1:0] nout, logic [8:0] imm);
    instr_t i;
    i.op = op; i.nout = nout; i.imm = imm;
    return i;
  endfunction

endpackage
