// control_unit: multicycle control of the accumulator processor.
//
// A Moore state machine. Every instruction starts with FETCH (IM <= imem[PC],
// PC <= PC + 2) and DECODE (BA and SA latched), then follows one path:
//   ALU with immediate   EXEC (ALUOut <= Acc op sext) -> ALUWB (Acc <= ALUOut)  4 cycles
//   ALU with memory      MEMRD -> MEMALU -> ALUWB                               5 cycles
//   LOAD, PULL           MEMRD -> MEMWB (Acc <= memory word)                    4 cycles
//   STORE, PUSH, PUSHRA  MEMWR                                                  3 cycles
//   jumps and branches   JUMP (PC <= BA or Acc; RA <= PC for JUMPL)            3 cycles
//   ALLOCATE/DEALLOCATE  SP                                                     3 cycles
// Unused opcodes return to FETCH after DECODE (2 cycles). instr_done is high
// in the last cycle of each instruction. While run is low the machine waits
// in FETCH without fetching. Synchronous active-high reset to FETCH.
// Assertions at the end state the sequencing rules.
// That the processor is multicycle, with IM, ALUOut and PC registers, follows
// the original design; the state sequence and cycle counts are this design's.
module control_unit
  import acc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    run,
  input  opcode_t opcode,
  input  logic    acc_zero,
  output ctrl_t   ctrl,
  output logic    instr_done,
  output state_t  state
);
  state_t next;

  function automatic alu_op_t alu_of(opcode_t op);
    unique case (op)
      OP_ADD, OP_ADDIMM: return ALU_ADD;
      OP_SUB, OP_SUBIMM: return ALU_SUB;
      OP_AND, OP_ANDIMM: return ALU_AND;
      OP_OR,  OP_ORIMM:  return ALU_OR;
      OP_CMPE:           return ALU_CMPE;
      OP_CMPLT:          return ALU_CMPLT;
      OP_SL:             return ALU_SL;
      OP_SR:             return ALU_SR;
      default:           return ALU_ADD;
    endcase
  endfunction

  always_ff @(posedge clk)
    if (rst) state <= S_FETCH;
    else     state <= next;

  always_comb begin
    ctrl       = '0;
    ctrl.alu_op = alu_of(opcode);
    next       = state;
    instr_done = 1'b0;
    unique case (state)
      S_FETCH: if (run) begin
        ctrl.ir_we  = 1'b1;
        ctrl.pc_we  = 1'b1;
        ctrl.pc_src = PC_INC;
        next        = S_DECODE;
      end
      S_DECODE: begin
        ctrl.bsa_we = 1'b1;
        unique case (opcode)
          OP_ADDIMM, OP_SUBIMM, OP_ANDIMM, OP_ORIMM, OP_CMPE, OP_CMPLT,
          OP_SL, OP_SR:                          next = S_EXEC;
          OP_ADD, OP_SUB, OP_AND, OP_OR,
          OP_LOAD, OP_PULL:                      next = S_MEMRD;
          OP_STORE, OP_PUSH, OP_PUSHRA:          next = S_MEMWR;
          OP_JUMP, OP_JUMPL, OP_JUMPACC,
          OP_BEZ, OP_BNEZ:                       next = S_JUMP;
          OP_ALLOCATE, OP_DEALLOCATE:            next = S_SP;
          default: begin
            next       = S_FETCH;
            instr_done = 1'b1;
          end
        endcase
      end
      S_EXEC: begin
        ctrl.alu_b     = B_IMM;
        ctrl.aluout_we = 1'b1;
        next           = S_ALUWB;
      end
      S_MEMRD: begin
        ctrl.addr_src = (opcode == OP_PULL) ? ADDR_SA : ADDR_IMM;
        next          = (opcode == OP_LOAD || opcode == OP_PULL) ? S_MEMWB : S_MEMALU;
      end
      S_MEMALU: begin
        ctrl.alu_b     = B_MEM;
        ctrl.aluout_we = 1'b1;
        next           = S_ALUWB;
      end
      S_ALUWB: begin
        ctrl.acc_we  = 1'b1;
        ctrl.acc_src = ACC_ALUOUT;
        next         = S_FETCH;
        instr_done   = 1'b1;
      end
      S_MEMWB: begin
        ctrl.acc_we  = 1'b1;
        ctrl.acc_src = ACC_MEM;
        next         = S_FETCH;
        instr_done   = 1'b1;
      end
      S_MEMWR: begin
        ctrl.dmem_we   = 1'b1;
        ctrl.addr_src  = (opcode == OP_STORE) ? ADDR_IMM : ADDR_SA;
        ctrl.wdata_src = (opcode == OP_PUSHRA) ? WD_RA : WD_ACC;
        next           = S_FETCH;
        instr_done     = 1'b1;
      end
      S_JUMP: begin
        unique case (opcode)
          OP_JUMP:    begin ctrl.pc_we = 1'b1; ctrl.pc_src = PC_BA; end
          OP_JUMPL:   begin ctrl.pc_we = 1'b1; ctrl.pc_src = PC_BA; ctrl.ra_we = 1'b1; end
          OP_JUMPACC: begin ctrl.pc_we = 1'b1; ctrl.pc_src = PC_ACC; end
          OP_BEZ:     begin ctrl.pc_we = acc_zero;  ctrl.pc_src = PC_BA; end
          OP_BNEZ:    begin ctrl.pc_we = !acc_zero; ctrl.pc_src = PC_BA; end
          default:    ;
        endcase
        next       = S_FETCH;
        instr_done = 1'b1;
      end
      S_SP: begin
        ctrl.sp_op = (opcode == OP_ALLOCATE) ? SP_ALLOC : SP_DEALLOC;
        next       = S_FETCH;
        instr_done = 1'b1;
      end
      default: next = S_FETCH;
    endcase
  end

  // Sequencing rules: an instruction ends by returning to FETCH, the PC is
  // only loaded in FETCH or JUMP, and memory is never written in the same
  // cycle as the accumulator.
  a_done_to_fetch: assert property (@(posedge clk) disable iff (rst)
                                    instr_done |=> state == S_FETCH);
  a_pc_load:       assert property (@(posedge clk) disable iff (rst)
                                    ctrl.pc_we |-> state inside {S_FETCH, S_JUMP});
  a_one_target:    assert property (@(posedge clk) disable iff (rst)
                                    !(ctrl.dmem_we && ctrl.acc_we));
endmodule
