// tb_program_counter: reset to 0, load on pc_we, hold otherwise.
module tb_program_counter;
  logic clk = 0, rst = 1, pc_we = 0;
  logic [15:0] pc_next = 0, pc, exp_pc;
  int checks = 0, failures = 0;

  program_counter #(.DATA_W(16)) dut (.clk, .rst, .pc_we, .pc_next, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++;
    if (pc !== 16'd0) begin failures++; $display("FAIL reset pc=%h", pc); end
    rst = 0;
    exp_pc = 0;
    for (int i = 0; i < 1000; i++) begin
      pc_we = $urandom % 2;
      pc_next = (i % 4 == 0) ? 16'($urandom) : exp_pc + 16'd2;
      if (pc_we) exp_pc = pc_next;
      @(posedge clk); #1;
      checks++;
      if (pc !== exp_pc) begin failures++; $display("FAIL pc=%h exp=%h", pc, exp_pc); end
    end
    rst = 1;
    @(posedge clk); #1;
    checks++;
    if (pc !== 16'd0) begin failures++; $display("FAIL second reset pc=%h", pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
