// tb_fetch_unit: loads a program, then fetches it: each fetch cycle latches
// the instruction at PC into the IM register while PC advances by 2; a
// jump (pc_next set to a target) redirects the next fetch.
module tb_fetch_unit;
  logic clk = 0, rst = 1, ir_we = 0, pc_we = 0, prog_we = 0;
  logic [15:0] pc_next = 0, prog_data = 0, pc, ir;
  logic [9:0]  prog_addr = 0;
  logic [15:0] shadow [64];
  int checks = 0, failures = 0;

  fetch_unit dut (.clk, .rst, .ir_we, .pc_we, .pc_next, .prog_we, .prog_addr,
                  .prog_data, .pc, .ir);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fetch(logic [15:0] exp_pc);
    ir_we = 1; pc_we = 1; pc_next = pc + 16'd2;
    checks++;
    if (pc !== exp_pc) begin failures++; $display("FAIL pc=%h exp=%h", pc, exp_pc); end
    @(posedge clk); #1;
    ir_we = 0; pc_we = 0;
    checks++;
    if (ir !== shadow[exp_pc[6:1]] || pc !== exp_pc + 16'd2) begin
      failures++; $display("FAIL ir=%h exp=%h pc=%h", ir, shadow[exp_pc[6:1]], pc);
    end
    @(posedge clk); #1;   // a cycle in which IM and PC hold
    checks++;
    if (ir !== shadow[exp_pc[6:1]]) begin failures++; $display("FAIL ir not held"); end
  endtask

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 64; i++) begin
      prog_we = 1; prog_addr = 10'(i); prog_data = 16'($urandom); shadow[i] = prog_data;
      @(posedge clk); #1;
    end
    prog_we = 0;
    for (int i = 0; i < 20; i++) fetch(16'(2 * i));
    // jump to word 40
    pc_we = 1; pc_next = 16'd80;
    @(posedge clk); #1 pc_we = 0;
    for (int i = 40; i < 60; i++) fetch(16'(2 * i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
