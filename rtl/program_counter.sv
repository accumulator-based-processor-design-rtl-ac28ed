// program_counter: the PC register.
//
// Holds the byte address of the next instruction; instructions are two bytes,
// so sequential flow adds 2 and jump targets are the 10-bit field shifted left
// by one. Loads pc_next on a clock edge where pc_we is high; synchronous
// reset to address 0, where programs start.
module program_counter #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              pc_we,
  input  logic [DATA_W-1:0] pc_next,
  output logic [DATA_W-1:0] pc
);
  always_ff @(posedge clk)
    if (rst)        pc <= '0;
    else if (pc_we) pc <= pc_next;
endmodule
