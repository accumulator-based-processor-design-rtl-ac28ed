// tb_datapath: drives the datapath's control bundle directly, cycle by cycle
// (independently of the control unit), through a short program that uses
// every path: immediate and memory ALU operands, direct and stack addressing,
// ALLOCATE, PUSH/PULL/PUSHRA, JUMPL (RA = return address) and JUMPACC.
// Accumulator, PC, SP, RA and memory contents are compared with values
// worked out by hand.
module tb_datapath;
  import acc_pkg::*;
  import acc_asm_pkg::*;
  logic clk = 0, rst = 1;
  ctrl_t ctrl;
  opcode_t opcode;
  logic acc_zero, prog_we = 0;
  logic [9:0]  prog_addr = 0, dbg_addr = 0;
  logic [15:0] prog_data = 0, dbg_data, acc_out, pc_out, sp_out, ra_out;
  int checks = 0, failures = 0;

  datapath dut (.clk, .rst, .ctrl, .opcode, .acc_zero, .prog_we, .prog_addr,
                .prog_data, .dbg_addr, .dbg_data, .acc_out, .pc_out, .sp_out, .ra_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  task automatic step(ctrl_t c);
    ctrl = c;
    @(posedge clk); #1;
    ctrl = '0;
  endtask

  task automatic fetch_decode(opcode_t exp_op);
    ctrl_t c;
    c = '0; c.ir_we = 1; c.pc_we = 1; c.pc_src = PC_INC; step(c);
    chk(16'(opcode), 16'(exp_op), "decoded opcode");
    c = '0; c.bsa_we = 1; step(c);
  endtask

  task automatic alu_imm(opcode_t op, alu_op_t a);
    ctrl_t c;
    fetch_decode(op);
    c = '0; c.alu_op = a; c.alu_b = B_IMM; c.aluout_we = 1; step(c);
    c = '0; c.acc_we = 1; c.acc_src = ACC_ALUOUT; step(c);
  endtask

  task automatic alu_mem(opcode_t op, alu_op_t a);
    ctrl_t c;
    fetch_decode(op);
    c = '0; c.addr_src = ADDR_IMM; step(c);
    c = '0; c.alu_op = a; c.alu_b = B_MEM; c.aluout_we = 1; step(c);
    c = '0; c.acc_we = 1; c.acc_src = ACC_ALUOUT; step(c);
  endtask

  task automatic load(opcode_t op, addr_src_t s);
    ctrl_t c;
    fetch_decode(op);
    c = '0; c.addr_src = s; step(c);
    c = '0; c.addr_src = s; c.acc_we = 1; c.acc_src = ACC_MEM; step(c);
  endtask

  task automatic store(opcode_t op, addr_src_t s, wdata_src_t w);
    ctrl_t c;
    fetch_decode(op);
    c = '0; c.dmem_we = 1; c.addr_src = s; c.wdata_src = w; step(c);
  endtask

  task automatic jump(opcode_t op, pc_src_t p, bit ra);
    ctrl_t c;
    fetch_decode(op);
    c = '0; c.pc_we = 1; c.pc_src = p; c.ra_we = ra; step(c);
  endtask

  task automatic spop(opcode_t op, sp_op_t s);
    ctrl_t c;
    fetch_decode(op);
    c = '0; c.sp_op = s; step(c);
  endtask

  initial begin
    logic [15:0] prog [16];
    prog[0]  = enc(OP_ORIMM, 7);
    prog[1]  = enc(OP_STORE, 'h200);
    prog[2]  = enc(OP_ADDIMM, -3);
    prog[3]  = enc(OP_ADD, 'h200);
    prog[4]  = enc(OP_ALLOCATE, 2);
    prog[5]  = enc(OP_PUSH, 1);
    prog[6]  = enc(OP_LOAD, 'h200);
    prog[7]  = enc(OP_PULL, 1);
    prog[8]  = enc(OP_JUMPL, 12);
    prog[9]  = enc(OP_SL, 2);
    prog[10] = enc(OP_JUMP, 10);
    prog[11] = enc(OP_JUMP, 11);
    prog[12] = enc(OP_PUSHRA, 0);
    prog[13] = enc(OP_PULL, 0);
    prog[14] = enc(OP_JUMPACC, 0);
    prog[15] = enc(OP_JUMP, 15);
    ctrl = '0;
    @(posedge clk); #1 rst = 0;
    chk(acc_out, 16'd0, "acc after reset");
    chk(sp_out, 16'h03FB, "sp after reset");
    for (int i = 0; i < 16; i++) begin
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
      @(posedge clk); #1;
    end
    prog_we = 0;

    alu_imm(OP_ORIMM, ALU_OR);          chk(acc_out, 16'd7, "ORIMM 7");
    store(OP_STORE, ADDR_IMM, WD_ACC);
    dbg_addr = 10'h200; #1;             chk(dbg_data, 16'd7, "STORE 0x200");
    alu_imm(OP_ADDIMM, ALU_ADD);        chk(acc_out, 16'd4, "ADDIMM -3");
    alu_mem(OP_ADD, ALU_ADD);           chk(acc_out, 16'd11, "ADD 0x200");
    spop(OP_ALLOCATE, SP_ALLOC);        chk(sp_out, 16'h03F9, "ALLOCATE 2");
    store(OP_PUSH, ADDR_SA, WD_ACC);
    dbg_addr = 10'h3FA; #1;             chk(dbg_data, 16'd11, "PUSH 1");
    load(OP_LOAD, ADDR_IMM);            chk(acc_out, 16'd7, "LOAD 0x200");
    load(OP_PULL, ADDR_SA);             chk(acc_out, 16'd11, "PULL 1");
    chk(pc_out, 16'd16, "pc before JUMPL");
    jump(OP_JUMPL, PC_BA, 1'b1);        chk(pc_out, 16'd24, "JUMPL target");
    chk(ra_out, 16'd18, "return address");
    store(OP_PUSHRA, ADDR_SA, WD_RA);
    dbg_addr = 10'h3F9; #1;             chk(dbg_data, 16'd18, "PUSHRA 0");
    load(OP_PULL, ADDR_SA);             chk(acc_out, 16'd18, "PULL 0");
    jump(OP_JUMPACC, PC_ACC, 1'b0);     chk(pc_out, 16'd18, "JUMPACC");
    alu_imm(OP_SL, ALU_SL);             chk(acc_out, 16'd72, "SL 2");
    chk(16'(acc_zero), 16'd0, "acc_zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
