// stack_pointer: the stack-pointer register and stack-address adder.
//
// The stack grows downward in word units. ALLOCATE n (op = SP_ALLOC) lowers
// SP by n, DEALLOCATE n (SP_DEALLOC) raises it again. stack_addr = SP +
// offset is the address of stack slot "offset" for PUSH, PULL and PUSHRA, so
// slot 0 (the return address by convention) is at SP, and after the callee
// frees its frame the return values are at SP-1 and SP-2. SP resets to
// RESET_VAL, 0x3FB, the value the original subroutine example shows after a
// balanced ALLOCATE/DEALLOCATE. Updates on the clock edge.
module stack_pointer
  import acc_pkg::*;
#(
  parameter int unsigned       DATA_W    = acc_pkg::WORD_W,
  parameter logic [DATA_W-1:0] RESET_VAL = 'h3FB
) (
  input  logic              clk,
  input  logic              rst,
  input  sp_op_t            op,
  input  logic [DATA_W-1:0] amount,
  input  logic [DATA_W-1:0] offset,
  output logic [DATA_W-1:0] sp,
  output logic [DATA_W-1:0] stack_addr
);
  always_ff @(posedge clk)
    if (rst) sp <= RESET_VAL;
    else begin
      unique case (op)
        SP_ALLOC:   sp <= sp - amount;
        SP_DEALLOC: sp <= sp + amount;
        default:    ;
      endcase
    end

  always_comb stack_addr = sp + offset;
endmodule
