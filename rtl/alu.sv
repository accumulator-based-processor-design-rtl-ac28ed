// alu: arithmetic and logic unit of the accumulator processor.
//
// Operand a is always the accumulator; operand b is the sign-extended
// immediate or a word read from data memory. Operations: add, subtract,
// bitwise and/or, compare-equal and signed compare-less-than (result 1 or 0),
// and shift left / logical shift right by b[3:0]. Combinational; zero flags
// a zero result. The operation set follows the instruction list; signedness
// of the compare and the logical right shift are this design's choices.
module alu
  import acc_pkg::*;
#(
  parameter int unsigned DATA_W = acc_pkg::WORD_W
) (
  input  alu_op_t           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] y,
  output logic              zero
);
  localparam int unsigned SH_W = $clog2(DATA_W);

  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_CMPE:  y = DATA_W'(a == b);
      ALU_CMPLT: y = DATA_W'($signed(a) < $signed(b));
      ALU_SL:    y = a << b[SH_W-1:0];
      ALU_SR:    y = a >> b[SH_W-1:0];
      default:   y = '0;
    endcase
    zero = (y == '0);
  end
endmodule
