// datapath: multicycle datapath of the accumulator processor.
//
// The accumulator (Acc) is the only register a program sees. Around it sit
// the registers a multicycle machine needs: IM (instruction), PC, ALUOut, SP
// (stack pointer), RA (return address), BA (branch address) and SA (stack
// address). In the decode cycle BA takes the 10-bit field shifted left by one
// (a byte address of an instruction) and SA takes SP + sext(field). Data
// memory is addressed either directly by the 10-bit field (variables) or by
// SA (stack slots); it writes Acc, or RA for PUSHRA. The ALU's second operand
// is sext(field) or the word just read from data memory. PC loads PC+2,
// BA or Acc. Every register changes only on a clock edge where its control
// bit in ctrl is set; the control unit sequences them.
// The list of registers follows the original design; giving BA and SA these
// exact roles is this design's reading of their names.
module datapath
  import acc_pkg::*;
#(
  parameter int unsigned       DATA_W     = acc_pkg::WORD_W,
  parameter int unsigned       IMEM_WORDS = 1024,
  parameter string             IMEM_INIT  = "",
  parameter int unsigned       DMEM_WORDS = 1024,
  parameter logic [DATA_W-1:0] SP_RESET   = 'h3FB,
  localparam int unsigned      IAW        = $clog2(IMEM_WORDS),
  localparam int unsigned      DAW        = $clog2(DMEM_WORDS)
) (
  input  logic              clk,
  input  logic              rst,
  input  ctrl_t             ctrl,
  output opcode_t           opcode,
  output logic              acc_zero,
  input  logic              prog_we,
  input  logic [IAW-1:0]    prog_addr,
  input  logic [DATA_W-1:0] prog_data,
  input  logic [DAW-1:0]    dbg_addr,
  output logic [DATA_W-1:0] dbg_data,
  output logic [DATA_W-1:0] acc_out,
  output logic [DATA_W-1:0] pc_out,
  output logic [DATA_W-1:0] sp_out,
  output logic [DATA_W-1:0] ra_out
);
  logic [DATA_W-1:0] pc, ir, pc_next;
  logic [DATA_W-1:0] imm_sx, aluout, alu_b, mem_rdata, stack_addr, sp;
  logic [DATA_W-1:0] acc, ra, ba, sa;
  logic [IMM_W-1:0]  field;
  logic [DAW-1:0]    dmem_addr;
  logic [DATA_W-1:0] dmem_wdata;

  assign field  = ir[IMM_W-1:0];
  assign opcode = opcode_t'(ir[DATA_W-1 -: OPC_W]);

  // PC source
  always_comb
    unique case (ctrl.pc_src)
      PC_BA:   pc_next = ba;
      PC_ACC:  pc_next = acc;
      default: pc_next = pc + DATA_W'(2);
    endcase

  fetch_unit #(.DATA_W(DATA_W), .IMEM_WORDS(IMEM_WORDS), .IMEM_INIT(IMEM_INIT)) u_fetch (
    .clk, .rst, .ir_we(ctrl.ir_we), .pc_we(ctrl.pc_we), .pc_next,
    .prog_we, .prog_addr, .prog_data, .pc, .ir);

  sign_ext #(.IN_W(IMM_W), .OUT_W(DATA_W)) u_sext (.in(field), .out(imm_sx));

  stack_pointer #(.DATA_W(DATA_W), .RESET_VAL(SP_RESET)) u_sp (
    .clk, .rst, .op(ctrl.sp_op), .amount(imm_sx), .offset(imm_sx), .sp,
    .stack_addr);

  // BA / SA, latched in decode
  always_ff @(posedge clk)
    if (rst) begin
      ba <= '0;
      sa <= '0;
    end else if (ctrl.bsa_we) begin
      ba <= DATA_W'({field, 1'b0});
      sa <= stack_addr;
    end

  always_comb alu_b = (ctrl.alu_b == B_MEM) ? mem_rdata : imm_sx;

  alu_aluout #(.DATA_W(DATA_W)) u_alu (
    .clk, .rst, .aluout_we(ctrl.aluout_we), .op(ctrl.alu_op), .a(acc),
    .b(alu_b), .aluout);

  always_comb begin
    dmem_addr  = (ctrl.addr_src == ADDR_SA) ? sa[DAW-1:0] : DAW'(field);
    dmem_wdata = (ctrl.wdata_src == WD_RA) ? ra : acc;
  end

  data_mem #(.DATA_W(DATA_W), .WORDS(DMEM_WORDS)) u_dmem (
    .clk, .we(ctrl.dmem_we), .addr(dmem_addr), .wdata(dmem_wdata),
    .rdata(mem_rdata), .dbg_addr, .dbg_data);

  // Accumulator and return-address register
  always_ff @(posedge clk)
    if (rst) begin
      acc <= '0;
      ra  <= '0;
    end else begin
      if (ctrl.acc_we) acc <= (ctrl.acc_src == ACC_MEM) ? mem_rdata : aluout;
      if (ctrl.ra_we)  ra  <= pc;   // PC already points past the JUMPL
    end

  assign acc_zero = (acc == '0);
  assign acc_out  = acc;
  assign pc_out   = pc;
  assign sp_out   = sp;
  assign ra_out   = ra;

  // SA bits above the data-memory address are not used
  logic unused_sa_hi;
  assign unused_sa_hi = ^sa[DATA_W-1:DAW];
endmodule
