// tb_stack_pointer: reset value 0x3FB, ALLOCATE lowers and DEALLOCATE raises
// SP, and stack_addr = SP + offset, including negative offsets.
module tb_stack_pointer;
  import acc_pkg::*;
  logic clk = 0, rst = 1;
  sp_op_t op = SP_HOLD;
  logic [15:0] amount = 0, offset = 0, sp, stack_addr, exp_sp;
  int checks = 0, failures = 0;

  stack_pointer dut (.clk, .rst, .op, .amount, .offset, .sp, .stack_addr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    exp_sp = 16'h03FB;
    checks++;
    if (sp !== exp_sp) begin failures++; $display("FAIL reset sp=%h", sp); end
    for (int i = 0; i < 2000; i++) begin
      op = sp_op_t'($urandom % 3);
      amount = 16'($urandom % 8);
      offset = 16'(int'($urandom % 9) - 4);
      #1;
      checks++;
      if (stack_addr !== 16'(exp_sp + offset)) begin
        failures++; $display("FAIL stack_addr=%h sp=%h off=%h", stack_addr, sp, offset);
      end
      if (op == SP_ALLOC)   exp_sp = exp_sp - amount;
      if (op == SP_DEALLOC) exp_sp = exp_sp + amount;
      @(posedge clk); #1;
      checks++;
      if (sp !== exp_sp) begin failures++; $display("FAIL sp=%h exp=%h", sp, exp_sp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
