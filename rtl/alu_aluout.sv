// alu_aluout: the ALU with its ALUOut register.
//
// The ALU result is captured in ALUOut on a clock edge where aluout_we is
// high, so that a multicycle instruction computes in one cycle and writes the
// accumulator from ALUOut in the next. ALUOut resets to zero (synchronous,
// active-high reset; the reset style is this design's choice).
module alu_aluout
  import acc_pkg::*;
#(
  parameter int unsigned DATA_W = acc_pkg::WORD_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              aluout_we,
  input  alu_op_t           op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] aluout
);
  logic [DATA_W-1:0] y;
  logic              zero_unused;

  alu #(.DATA_W(DATA_W)) u_alu (.op, .a, .b, .y, .zero(zero_unused));

  always_ff @(posedge clk)
    if (rst)            aluout <= '0;
    else if (aluout_we) aluout <= y;
endmodule
