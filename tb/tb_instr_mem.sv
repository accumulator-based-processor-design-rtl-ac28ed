// tb_instr_mem: fills the whole instruction memory through the load port and
// reads every instruction back by its byte address (2 x word index, with
// and without the low byte bit set).
module tb_instr_mem;
  logic clk = 0, we = 0;
  logic [9:0]  waddr = 0;
  logic [15:0] wdata = 0, pc = 0, instr;
  logic [15:0] shadow [1024];
  int checks = 0, failures = 0;

  instr_mem dut (.clk, .we, .waddr, .wdata, .pc, .instr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      we = 1; waddr = 10'(i); wdata = 16'($urandom); shadow[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 1024; i++) begin
      pc = 16'(2 * i) | 16'($urandom % 2);
      #1;
      checks++;
      if (instr !== shadow[i]) begin
        failures++;
        $display("FAIL pc=%h instr=%h exp=%h", pc, instr, shadow[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
