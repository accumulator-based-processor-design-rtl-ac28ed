// tb_acc_cpu_hexprog: runs a program delivered as a machine-code file.
//
// The instruction memory is initialised from tb/relprime.hex (relprime(30)
// with a nested gcd call) through the top's IMEM_INIT parameter, with no use
// of the load port. The result, 7, must appear in the accumulator and at data
// word 0x300, with SP back at its reset value. The test also checks that
// the opcode numbers agree with machine words of the original listing
// (e.g. 0100010000000010 = ALLOCATE 2).
module tb_acc_cpu_hexprog;
  import acc_pkg::*;
  import acc_asm_pkg::*;

  logic clk = 0, rst = 1, run = 0, instr_done;
  logic [9:0]  dbg_addr = 10'h300;
  logic [15:0] dbg_data, acc_out, pc_out, sp_out, ra_out;
  state_t state;
  int checks = 0, failures = 0, instrs = 0;

  acc_cpu #(.IMEM_INIT("tb/relprime.hex")) dut (
    .clk, .rst, .run, .prog_we(1'b0), .prog_addr(10'd0), .prog_data(16'd0),
    .dbg_addr, .dbg_data, .acc_out, .pc_out, .sp_out, .ra_out, .instr_done, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    // machine words as printed in the original assembler listing
    chk(enc(OP_ALLOCATE, 2),    16'b0100010000000010, "ALLOCATE 2");
    chk(enc(OP_PUSH, 1),        16'b0100110000000001, "PUSH 1");
    chk(enc(OP_JUMPL, 6),       16'b0011000000000110, "JUMPL RELPRIME");
    chk(enc(OP_PULL, -1),       16'b0101001111111111, "PULL -1");
    chk(enc(OP_JUMP, 4),        16'b0010110000000100, "JUMP RESULTLOOP");
    chk(enc(OP_ORIMM, 2),       16'b0001010000000010, "ORIMM 2");
    chk(enc(OP_STORE, 'h200),   16'b0011101000000000, "STORE m");
    chk(enc(OP_LOAD, 'h202),    16'b0011011000000010, "LOAD n");
    chk(enc(OP_PUSHRA, 0),      16'b0101010000000000, "PUSHRA 0");
    chk(enc(OP_ANDIMM, 0),      16'b0000110000000000, "ANDIMM 0");

    @(posedge clk); #1 rst = 0;
    run = 1;
    // the program ends in a jump to itself at byte address 0xe
    while (!(state == S_FETCH && pc_out == 16'h000e && instrs > 0)) begin
      @(posedge clk); #1;
      if (instr_done) instrs++;
    end
    @(posedge clk); #1;
    $display("relprime(30) from hex file: %0d instructions", instrs);
    chk(dbg_data, 7, "result at 0x300");
    chk(acc_out, 7, "accumulator");
    chk(sp_out, 'h3FB, "SP restored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
