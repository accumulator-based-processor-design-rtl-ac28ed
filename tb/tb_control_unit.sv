// tb_control_unit: runs every opcode through the state machine and checks
// the number of cycles per instruction, the state sequence, and the control
// bits of each step: fetch loads IM and PC, decode latches BA/SA, ALU
// instructions write ALUOut then Acc, memory instructions pick the direct or
// stack address and the right write data, branches load PC only when their
// condition holds, and ALLOCATE/DEALLOCATE move SP.
module tb_control_unit;
  import acc_pkg::*;
  import acc_asm_pkg::*;
  logic    clk = 0, rst = 1, run = 0, acc_zero = 0, instr_done;
  opcode_t opcode = OP_ADD;
  ctrl_t   ctrl;
  state_t  state;
  int checks = 0, failures = 0;

  control_unit dut (.clk, .rst, .run, .opcode, .acc_zero, .ctrl, .instr_done, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (opcode %s state %s)", what, opcode.name(), state.name()); end
  endtask

  // Run one instruction from FETCH; record what was seen in every cycle.
  task automatic run_one(opcode_t op, bit z);
    int cyc = 0;
    bit saw_aluout = 0, saw_acc = 0, saw_dwe = 0, saw_pcwe = 0, saw_ra = 0;
    bit saw_sp = 0;
    opcode = op; acc_zero = z;
    #1;
    expect_true(state == S_FETCH, "starts in FETCH");
    do begin
      if (cyc == 0) expect_true(ctrl.ir_we && ctrl.pc_we && ctrl.pc_src == PC_INC, "fetch controls");
      if (cyc == 1) expect_true(ctrl.bsa_we && !ctrl.pc_we, "decode controls");
      if (cyc >= 2) begin
        if (ctrl.aluout_we) begin
          saw_aluout = 1;
          expect_true(ctrl.alu_b == ((op inside {OP_ADD, OP_SUB, OP_AND, OP_OR}) ? B_MEM : B_IMM), "ALU operand B");
        end
        if (ctrl.acc_we) begin
          saw_acc = 1;
          expect_true(ctrl.acc_src == ((op inside {OP_LOAD, OP_PULL}) ? ACC_MEM : ACC_ALUOUT), "acc source");
        end
        if (ctrl.dmem_we) begin
          saw_dwe = 1;
          expect_true(ctrl.addr_src == ((op == OP_STORE) ? ADDR_IMM : ADDR_SA), "write address source");
          expect_true(ctrl.wdata_src == ((op == OP_PUSHRA) ? WD_RA : WD_ACC), "write data source");
        end
        if (op inside {OP_LOAD, OP_ADD, OP_SUB, OP_AND, OP_OR} && cyc == 2) expect_true(ctrl.addr_src == ADDR_IMM, "direct read address");
        if (op == OP_PULL && cyc == 2) expect_true(ctrl.addr_src == ADDR_SA, "stack read address");
        if (ctrl.pc_we) begin
          saw_pcwe = 1;
          expect_true(ctrl.pc_src == ((op == OP_JUMPACC) ? PC_ACC : PC_BA), "pc source");
        end
        if (ctrl.ra_we) saw_ra = 1;
        if (ctrl.sp_op != SP_HOLD) begin
          saw_sp = 1;
          expect_true(ctrl.sp_op == ((op == OP_ALLOCATE) ? SP_ALLOC : SP_DEALLOC), "sp op");
        end
      end
      cyc++;
      @(posedge clk);
      #1;
    end while (!(state == S_FETCH) && cyc < 20);
    expect_true(cyc == cycles_of(op), $sformatf("cycles %0d expected %0d", cyc, cycles_of(op)));
    expect_true(saw_aluout == (op inside {OP_ADD, OP_ADDIMM, OP_SUB, OP_SUBIMM, OP_AND, OP_ANDIMM,
                               OP_OR, OP_ORIMM, OP_CMPE, OP_CMPLT, OP_SL, OP_SR}), "ALUOut written");
    expect_true(saw_acc == (op inside {OP_ADD, OP_ADDIMM, OP_SUB, OP_SUBIMM, OP_AND, OP_ANDIMM,
                            OP_OR, OP_ORIMM, OP_CMPE, OP_CMPLT, OP_SL, OP_SR, OP_LOAD, OP_PULL}), "Acc written");
    expect_true(saw_dwe == (op inside {OP_STORE, OP_PUSH, OP_PUSHRA}), "memory written");
    expect_true(saw_pcwe == (op inside {OP_JUMP, OP_JUMPL, OP_JUMPACC} ||
                             (op == OP_BEZ && z) || (op == OP_BNEZ && !z)), "PC loaded");
    expect_true(saw_ra == (op == OP_JUMPL), "RA written");
    expect_true(saw_sp == (op inside {OP_ALLOCATE, OP_DEALLOCATE}), "SP changed");
  endtask

  initial begin
    @(posedge clk); #1 rst = 0;
    // run low: the machine must wait in FETCH without loading IM or PC
    repeat (3) begin
      #1 expect_true(state == S_FETCH && !ctrl.ir_we && !ctrl.pc_we, "idle while run low");
      @(posedge clk);
    end
    #1 run = 1;
    for (int o = 0; o < 27; o++) begin
      run_one(opcode_t'(o), 1'b0);
      run_one(opcode_t'(o), 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
