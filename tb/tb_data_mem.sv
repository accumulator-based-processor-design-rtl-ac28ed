// tb_data_mem: random writes and reads against a shadow array. A read
// returns the addressed word one clock later; the observation port reads
// combinationally.
module tb_data_mem;
  logic clk = 0, we = 0;
  logic [9:0]  addr = 0, dbg_addr = 0;
  logic [15:0] wdata = 0, rdata, dbg_data;
  logic [15:0] shadow [1024];
  int checks = 0, failures = 0;

  data_mem dut (.clk, .we, .addr, .wdata, .rdata, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      we = 1; addr = 10'(i); wdata = 16'($urandom); shadow[i] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 6000; i++) begin
      logic [15:0] e;
      we = ($urandom % 2) != 0;
      addr = 10'($urandom);
      wdata = 16'($urandom);
      dbg_addr = 10'($urandom);
      e = shadow[addr];       // value before this cycle's write
      #1;
      checks++;
      if (dbg_data !== shadow[dbg_addr]) begin
        failures++; $display("FAIL dbg addr=%0d %h exp %h", dbg_addr, dbg_data, shadow[dbg_addr]);
      end
      @(posedge clk); #1;
      if (we) shadow[addr] = wdata;
      checks++;
      if (rdata !== e) begin
        failures++; $display("FAIL read addr=%0d %h exp %h", addr, rdata, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
