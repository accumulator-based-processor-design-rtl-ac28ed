// acc_pkg: types and constants shared by the accumulator processor.
//
// Every instruction is one 16-bit "universal" word: a 6-bit opcode in bits
// [15:10] and a 10-bit immediate or address in bits [9:0]. The opcodes of
// ANDIMM, ORIMM, JUMP, JUMPL, LOAD, STORE, ALLOCATE, PUSH, PULL and PUSHRA are
// the ones of the original machine-code listing; the numbers of the other
// instructions are this design's choice, filled into the free codes in the
// same pattern (a memory form followed by its immediate form). Unused codes
// execute as no-operations.
package acc_pkg;

  localparam int unsigned WORD_W = 16;
  localparam int unsigned OPC_W  = 6;
  localparam int unsigned IMM_W  = 10;

  typedef enum logic [OPC_W-1:0] {
    OP_ADD        = 6'd0,   // Acc = Acc + Mem[a]
    OP_ADDIMM     = 6'd1,   // Acc = Acc + sext(i)
    OP_AND        = 6'd2,
    OP_ANDIMM     = 6'd3,
    OP_OR         = 6'd4,
    OP_ORIMM      = 6'd5,
    OP_SUB        = 6'd6,
    OP_SUBIMM     = 6'd7,
    OP_SL         = 6'd8,   // Acc = Acc << i
    OP_SR         = 6'd9,   // Acc = Acc >> i (logical)
    OP_BEZ        = 6'd10,  // if (Acc == 0) PC = i << 1
    OP_JUMP       = 6'd11,  // PC = i << 1
    OP_JUMPL      = 6'd12,  // RA = PC + 2; PC = i << 1
    OP_LOAD       = 6'd13,  // Acc = Mem[a]
    OP_STORE      = 6'd14,  // Mem[a] = Acc
    OP_BNEZ       = 6'd15,  // if (Acc != 0) PC = i << 1
    OP_JUMPACC    = 6'd16,  // PC = Acc
    OP_ALLOCATE   = 6'd17,  // SP = SP - i
    OP_DEALLOCATE = 6'd18,  // SP = SP + i
    OP_PUSH       = 6'd19,  // Mem[SP + i] = Acc
    OP_PULL       = 6'd20,  // Acc = Mem[SP + i]
    OP_PUSHRA     = 6'd21,  // Mem[SP + i] = RA
    OP_CMPE       = 6'd22,  // Acc = (Acc == sext(i))
    OP_CMPLT      = 6'd23   // Acc = (Acc < sext(i)), signed
  } opcode_t;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_CMPE, ALU_CMPLT, ALU_SL, ALU_SR
  } alu_op_t;

  typedef enum logic [1:0] { SP_HOLD, SP_ALLOC, SP_DEALLOC } sp_op_t;
  typedef enum logic [1:0] { PC_INC, PC_BA, PC_ACC }         pc_src_t;
  typedef enum logic       { B_IMM, B_MEM }                  alu_b_t;
  typedef enum logic       { ACC_ALUOUT, ACC_MEM }           acc_src_t;
  typedef enum logic       { ADDR_IMM, ADDR_SA }             addr_src_t;
  typedef enum logic       { WD_ACC, WD_RA }                 wdata_src_t;

  // One bundle of every control signal the control unit drives.
  typedef struct packed {
    logic       ir_we;      // latch instruction into IM register
    logic       pc_we;
    pc_src_t    pc_src;
    logic       bsa_we;     // latch BA (branch address) and SA (stack address)
    alu_op_t    alu_op;
    alu_b_t     alu_b;
    logic       aluout_we;
    logic       acc_we;
    acc_src_t   acc_src;
    logic       ra_we;
    sp_op_t     sp_op;
    logic       dmem_we;
    addr_src_t  addr_src;
    wdata_src_t wdata_src;
  } ctrl_t;

  typedef enum logic [3:0] {
    S_FETCH, S_DECODE, S_EXEC, S_ALUWB, S_MEMRD, S_MEMALU, S_MEMWB,
    S_MEMWR, S_JUMP, S_SP
  } state_t;


endpackage
