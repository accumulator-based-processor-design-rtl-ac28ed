// tb_acc_cpu: end-to-end test of the processor at its default size.
//
// Loads and runs five programs, resetting between them:
//   1. the arithmetic sequence of the instruction examples (ADDIMM ... SR),
//   2. the memory sequence: variables, a count-down loop, a three-slot stack
//      frame,
//   3. the subroutine example: two arguments on the stack, JUMPL, the callee
//      saving RA with PUSHRA and returning with JUMPACC, result read with
//      PULL -1 and SP back at 0x3FB,
//   4./5. relprime(N) for two values of N: the smallest m >= 2 with
//      gcd(m, N) = 1, a nested call (relprime calls a subtracting gcd).
// After every instruction the accumulator is compared with the value the
// program should hold at that address (where one is known); the cycles per
// instruction are checked against the control unit's schedule; memory and
// SP are checked at the end of each program. Every opcode, taken and
// untaken BEZ and BNEZ, calls, returns and stack-frame nesting are counted,
// and one that never happened counts as a failure.
module tb_acc_cpu;
  import acc_pkg::*;
  import acc_asm_pkg::*;

  logic clk = 0, rst = 1, run = 0, prog_we = 0, instr_done;
  logic [9:0]  prog_addr = 0, dbg_addr = 0;
  logic [15:0] prog_data = 0, dbg_data, acc_out, pc_out, sp_out, ra_out;
  state_t state;
  int checks = 0, failures = 0;

  acc_cpu dut (.clk, .rst, .run, .prog_we, .prog_addr, .prog_data, .dbg_addr,
               .dbg_data, .acc_out, .pc_out, .sp_out, .ra_out, .instr_done, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- program
  logic [15:0] prog [$];
  int          exp_acc [int];     // byte address -> accumulator after it
  int          op_count [opcode_t];
  int          bez_taken, bez_not, bnez_taken, bnez_not, max_depth;

  task automatic emit(opcode_t op, int imm, int acc = -1);
    if (acc >= 0) exp_acc[2 * prog.size()] = acc;
    prog.push_back(enc(op, imm));
  endtask

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d (0x%h) expected %0d (0x%h)", what, got, got, exp, exp); end
  endtask

  // Load prog[], reset, run until the instruction at halt_addr (a jump to
  // itself) has been fetched.
  task automatic run_prog(string name, int halt_addr, int max_instr = 20000);
    int n = 0, cyc = 0, fetch_pc = 0, depth = 0;
    opcode_t op;
    run = 0; rst = 1;
    @(posedge clk); #1;
    rst = 0;
    foreach (prog[i]) begin
      prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
      @(posedge clk); #1;
    end
    prog_we = 0;
    run = 1;
    forever begin
      if (state == S_FETCH) begin
        fetch_pc = pc_out;
        cyc = 0;
        if (fetch_pc == halt_addr) break;
      end
      cyc++;
      if (instr_done) begin
        op = opcode_t'(prog[fetch_pc / 2][15:10]);
        @(posedge clk); #1;
        n++;
        op_count[op]++;
        chk(cyc, cycles_of(op), $sformatf("%s cycles of %s at 0x%h", name, op.name(), fetch_pc));
        if (exp_acc.exists(fetch_pc))
          chk(acc_out, exp_acc[fetch_pc], $sformatf("%s acc after %s at 0x%h", name, op.name(), fetch_pc));
        if (op == OP_BEZ)  begin if (pc_out != fetch_pc + 2) bez_taken++;  else bez_not++;  end
        if (op == OP_BNEZ) begin if (pc_out != fetch_pc + 2) bnez_taken++; else bnez_not++; end
        if (op == OP_JUMPL) begin
          chk(ra_out, fetch_pc + 2, $sformatf("%s RA after JUMPL", name));
          depth++;
          if (depth > max_depth) max_depth = depth;
        end
        if (op == OP_JUMPACC) depth--;
        if (n >= max_instr) begin
          failures++;
          $display("FAIL %s did not reach 0x%h", name, halt_addr);
          break;
        end
      end else begin
        @(posedge clk); #1;
      end
    end
    run = 0;
    $display("%s: %0d instructions", name, n);
  endtask

  task automatic peek(int a, int exp, string what);
    dbg_addr = 10'(a); #1;
    chk(dbg_data, exp, what);
  endtask

  function automatic int gcd(int a, int b);
    while (b != 0) begin int t = a % b; a = b; b = t; end
    return a;
  endfunction

  function automatic int relprime(int n);
    int m = 2;
    while (gcd(m, n) != 1) m++;
    return m;
  endfunction

  localparam int X = 'h200, Y = 'h202, VB = 'h204;

  initial begin
    // ---------------------------------------------------- 1. arithmetic
    prog.delete(); exp_acc.delete();
    emit(OP_ADDIMM, 5, 5);
    emit(OP_SUBIMM, 2, 3);
    emit(OP_ORIMM, 50, 51);
    emit(OP_ANDIMM, 22, 18);
    emit(OP_CMPE, 18, 1);
    emit(OP_ORIMM, 35, 35);
    emit(OP_CMPLT, 100, 1);
    emit(OP_ORIMM, 35, 35);
    emit(OP_CMPLT, 30, 0);
    emit(OP_ORIMM, 8, 8);
    emit(OP_SL, 1, 16);
    emit(OP_SR, 2, 4);
    emit(OP_JUMP, prog.size());
    run_prog("arithmetic", 2 * (prog.size() - 1));
    chk(acc_out, 4, "arithmetic final acc");

    // ---------------------------------------------------- 2. memory
    prog.delete(); exp_acc.delete();
    emit(OP_ANDIMM, 0, 0);
    emit(OP_ORIMM, 4, 4);
    emit(OP_STORE, X, 4);
    emit(OP_ADDIMM, 2, 6);
    emit(OP_STORE, Y, 6);
    emit(OP_LOAD, X, 4);
    emit(OP_ADD, Y, 10);
    emit(OP_SUB, X, 6);
    emit(OP_AND, X, 4);
    emit(OP_OR, Y, 6);
    // LOOP (word 10): count Y down to 1
    emit(OP_CMPE, 1);
    emit(OP_BNEZ, 17);
    emit(OP_LOAD, Y);
    emit(OP_SUBIMM, 1);
    emit(OP_STORE, Y);
    emit(OP_JUMP, 10);
    emit(OP_JUMP, 16);              // not reached
    // BREAK (word 17)
    emit(OP_ALLOCATE, 3, 1);
    emit(OP_PUSH, 0, 1);
    emit(OP_ADDIMM, 10, 11);
    emit(OP_PUSH, 1, 11);
    emit(OP_ADDIMM, 10, 21);
    emit(OP_PUSH, 2, 21);
    emit(OP_PULL, 0, 1);
    emit(OP_PULL, 1, 11);
    emit(OP_PULL, 2, 21);
    emit(OP_DEALLOCATE, 3, 21);
    emit(OP_JUMP, prog.size());
    run_prog("memory", 2 * (prog.size() - 1));
    peek(X, 4, "memory: X");
    peek(Y, 1, "memory: Y counted down");
    peek('h3F8, 1, "memory: stack slot 0");
    peek('h3F9, 11, "memory: stack slot 1");
    peek('h3FA, 21, "memory: stack slot 2");
    chk(sp_out, 'h3FB, "memory: SP restored");

    // ---------------------------------------------------- 3. subroutine
    prog.delete(); exp_acc.delete();
    emit(OP_ALLOCATE, 2);
    emit(OP_ANDIMM, 0, 0);
    emit(OP_ORIMM, 55, 55);
    emit(OP_PUSH, 0, 55);
    emit(OP_ANDIMM, 0, 0);
    emit(OP_ORIMM, 45, 45);
    emit(OP_PUSH, 1, 45);
    emit(OP_JUMPL, 12);
    emit(OP_PULL, -1, 100);         // returns here, 0x10
    emit(OP_ANDIMM, 0, 0);
    emit(OP_ORIMM, 50, 50);
    emit(OP_JUMP, 11);              // halt
    // ADD_FUNCTION (word 12)
    emit(OP_PULL, 1, 45);
    emit(OP_STORE, VB, 45);
    emit(OP_PULL, 0, 55);
    emit(OP_ADD, VB, 100);
    emit(OP_PUSHRA, 0, 100);
    emit(OP_PUSH, 1, 100);
    emit(OP_PULL, 0, 'h10);
    emit(OP_DEALLOCATE, 2, 'h10);
    emit(OP_JUMPACC, 0, 'h10);
    run_prog("subroutine", 22);
    chk(acc_out, 50, "subroutine final acc");
    chk(sp_out, 'h3FB, "subroutine: SP after DEALLOCATE 2");
    peek('h3F9, 'h10, "subroutine: return address on stack");
    peek('h3FA, 100, "subroutine: return value at SP-1");
    peek(VB, 45, "subroutine: b");

    // ---------------------------------------------------- 4./5. relprime
    for (int k = 0; k < 2; k++) begin
      int nval;
      nval = (k == 0) ? 30 : 210;
      prog.delete(); exp_acc.delete();
      emit(OP_ANDIMM, 0);
      emit(OP_ORIMM, nval);
      emit(OP_ALLOCATE, 2);
      emit(OP_PUSH, 1);
      emit(OP_JUMPL, 8);
      emit(OP_PULL, -1, relprime(nval));
      emit(OP_STORE, 'h300);
      emit(OP_JUMP, 7);             // RESULTLOOP: halt
      // RELPRIME (word 8)
      emit(OP_ANDIMM, 0);
      emit(OP_ORIMM, 2);
      emit(OP_STORE, 'h200);        // m = 2
      emit(OP_PULL, 1, nval);
      emit(OP_STORE, 'h202);        // n
      emit(OP_ALLOCATE, 3);
      emit(OP_PUSHRA, 0);
      // WHILE (word 15)
      emit(OP_LOAD, 'h202);
      emit(OP_PUSH, 1);
      emit(OP_LOAD, 'h200);
      emit(OP_PUSH, 2);
      emit(OP_JUMPL, 35);
      emit(OP_PULL, 1);             // gcd(m, n)
      emit(OP_CMPE, 1);
      emit(OP_BNEZ, 27);
      emit(OP_LOAD, 'h200);
      emit(OP_ADDIMM, 1);
      emit(OP_STORE, 'h200);
      emit(OP_JUMP, 15);
      // RELPRIMEDONE (word 27)
      emit(OP_PULL, 0);
      emit(OP_STORE, 'h208);
      emit(OP_DEALLOCATE, 3);
      emit(OP_LOAD, 'h200, relprime(nval));
      emit(OP_PUSH, 1);
      emit(OP_DEALLOCATE, 2);
      emit(OP_LOAD, 'h208, 10);
      emit(OP_JUMPACC, 0);
      // GCD (word 35)
      emit(OP_ALLOCATE, 1);
      emit(OP_PUSHRA, 0);
      emit(OP_PULL, 2);
      emit(OP_STORE, 'h204);        // a
      emit(OP_PULL, 3);
      emit(OP_STORE, 'h206);        // b
      // GCDWHILE (word 41)
      emit(OP_LOAD, 'h206);
      emit(OP_BEZ, 55);
      emit(OP_LOAD, 'h206);
      emit(OP_SUB, 'h204);
      emit(OP_CMPLT, 0);
      emit(OP_BNEZ, 51);
      emit(OP_LOAD, 'h206);         // b = b - a
      emit(OP_SUB, 'h204);
      emit(OP_STORE, 'h206);
      emit(OP_JUMP, 41);
      // a = a - b (word 51)
      emit(OP_LOAD, 'h204);
      emit(OP_SUB, 'h206);
      emit(OP_STORE, 'h204);
      emit(OP_JUMP, 41);
      // RETURN_A (word 55)
      emit(OP_LOAD, 'h204);
      emit(OP_PUSH, 2);
      emit(OP_PULL, 0, 40);
      emit(OP_DEALLOCATE, 1);
      emit(OP_JUMPACC, 0);
      run_prog($sformatf("relprime(%0d)", nval), 14);
      peek('h300, relprime(nval), $sformatf("relprime(%0d) result", nval));
      chk(sp_out, 'h3FB, "relprime: SP restored");
    end

    // ---------------------------------------------------- coverage
    for (int o = 0; o < 24; o++) begin
      checks++;
      if (!op_count.exists(opcode_t'(o))) begin
        failures++;
        $display("FAIL opcode %s never executed", opcode_t'(o));
      end
    end
    foreach (op_count[o]) $display("  %-11s %0d", o.name(), op_count[o]);
    $display("  BEZ taken %0d / not %0d, BNEZ taken %0d / not %0d, deepest call nesting %0d",
             bez_taken, bez_not, bnez_taken, bnez_not, max_depth);
    chk(int'(bez_taken > 0 && bez_not > 0), 1, "BEZ taken and not taken");
    chk(int'(bnez_taken > 0 && bnez_not > 0), 1, "BNEZ taken and not taken");
    chk(int'(max_depth >= 2), 1, "nested subroutine call");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
