// acc_cpu: top level of the 16-bit accumulator processor.
//
// A multicycle processor whose only programmer-visible register is the
// accumulator. Every instruction is one 16-bit word: 6-bit opcode, 10-bit
// immediate or address. Subroutines pass arguments and return values on a
// downward-growing stack in data memory (slot 0 holds the return address,
// return values sit at SP-1 and SP-2 once the callee has freed its frame).
// The top joins the control unit and the datapath.
// Interface: hold run low and write the program through prog_we/prog_addr/
// prog_data (word index), or name a hex file of instruction words in
// IMEM_INIT, then raise run; the processor starts at address 0.
// dbg_addr/dbg_data read data memory combinationally; acc_out, pc_out, sp_out
// and ra_out show the registers; instr_done marks the last cycle of every
// instruction. Synchronous active-high reset.
module acc_cpu
  import acc_pkg::*;
#(
  parameter int unsigned       IMEM_WORDS = 1024,
  parameter string             IMEM_INIT  = "",
  parameter int unsigned       DMEM_WORDS = 1024,
  parameter logic [WORD_W-1:0] SP_RESET   = 'h3FB,
  localparam int unsigned      IAW        = $clog2(IMEM_WORDS),
  localparam int unsigned      DAW        = $clog2(DMEM_WORDS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              run,
  input  logic              prog_we,
  input  logic [IAW-1:0]    prog_addr,
  input  logic [WORD_W-1:0] prog_data,
  input  logic [DAW-1:0]    dbg_addr,
  output logic [WORD_W-1:0] dbg_data,
  output logic [WORD_W-1:0] acc_out,
  output logic [WORD_W-1:0] pc_out,
  output logic [WORD_W-1:0] sp_out,
  output logic [WORD_W-1:0] ra_out,
  output logic              instr_done,
  output state_t            state
);
  ctrl_t   ctrl;
  opcode_t opcode;
  logic    acc_zero;

  control_unit u_ctrl (.clk, .rst, .run, .opcode, .acc_zero, .ctrl, .instr_done, .state);

  datapath #(.DATA_W(WORD_W), .IMEM_WORDS(IMEM_WORDS), .IMEM_INIT(IMEM_INIT), .DMEM_WORDS(DMEM_WORDS),
             .SP_RESET(SP_RESET)) u_dp (
    .clk, .rst, .ctrl, .opcode, .acc_zero, .prog_we, .prog_addr, .prog_data,
    .dbg_addr, .dbg_data, .acc_out, .pc_out, .sp_out, .ra_out);
endmodule
