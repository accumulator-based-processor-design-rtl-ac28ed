// fetch_unit: program counter, instruction memory and IM register.
//
// In the fetch cycle the control unit raises ir_we and pc_we together: the IM
// (instruction) register captures the instruction at PC while PC takes
// pc_next, which the datapath sets to PC + 2. Later cycles load PC with a
// branch target or the accumulator. The program is written through the prog_*
// port while the processor is held idle, or read at start-up from the hex
// file IMEM_INIT. Everything updates on the clock
// edge; the IM register resets to zero.
module fetch_unit #(
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter string       IMEM_INIT  = "",
  localparam int unsigned AW        = $clog2(IMEM_WORDS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ir_we,
  input  logic              pc_we,
  input  logic [DATA_W-1:0] pc_next,
  input  logic              prog_we,
  input  logic [AW-1:0]     prog_addr,
  input  logic [DATA_W-1:0] prog_data,
  output logic [DATA_W-1:0] pc,
  output logic [DATA_W-1:0] ir
);
  logic [DATA_W-1:0] instr;

  program_counter #(.DATA_W(DATA_W)) u_pc (.clk, .rst, .pc_we, .pc_next, .pc);

  instr_mem #(.DATA_W(DATA_W), .WORDS(IMEM_WORDS), .INIT_FILE(IMEM_INIT)) u_imem (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data), .pc, .instr);

  always_ff @(posedge clk)
    if (rst)        ir <= '0;
    else if (ir_we) ir <= instr;
endmodule
