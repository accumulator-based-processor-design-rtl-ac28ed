// acc_asm_pkg: testbench helpers for the accumulator processor.
//
// enc() assembles one instruction word (opcode in [15:10], the low ten bits
// of imm in [9:0], so negative offsets such as PULL -1 work). cycles_of()
// gives the number of clock cycles the multicycle control spends on each
// instruction, used to check timing.
package acc_asm_pkg;
  import acc_pkg::*;

  function automatic logic [15:0] enc(opcode_t op, int imm);
    logic [9:0] f;
    f = 10'(imm);
    return {op, f};
  endfunction

  function automatic int cycles_of(opcode_t op);
    case (op)
      OP_ADDIMM, OP_SUBIMM, OP_ANDIMM, OP_ORIMM, OP_CMPE, OP_CMPLT,
      OP_SL, OP_SR, OP_LOAD, OP_PULL:             return 4;
      OP_ADD, OP_SUB, OP_AND, OP_OR:              return 5;
      OP_STORE, OP_PUSH, OP_PUSHRA, OP_JUMP, OP_JUMPL, OP_JUMPACC,
      OP_BEZ, OP_BNEZ, OP_ALLOCATE, OP_DEALLOCATE: return 3;
      default:                                     return 2;
    endcase
  endfunction
endpackage
