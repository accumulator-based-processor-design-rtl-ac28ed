// tb_alu_aluout: checks that ALUOut captures the ALU result one clock after
// aluout_we and holds it otherwise.
module tb_alu_aluout;
  import acc_pkg::*;
  logic clk = 0, rst = 1, aluout_we = 0;
  alu_op_t op = ALU_ADD;
  logic [15:0] a = 0, b = 0, aluout, held;
  int checks = 0, failures = 0;

  alu_aluout dut (.clk, .rst, .aluout_we, .op, .a, .b, .aluout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model(alu_op_t o, logic [15:0] x, logic [15:0] z);
    case (o)
      ALU_ADD:   return x + z;
      ALU_SUB:   return x - z;
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_CMPE:  return {15'd0, x == z};
      ALU_CMPLT: return {15'd0, $signed(x) < $signed(z)};
      ALU_SL:    return x << z[3:0];
      default:   return x >> z[3:0];
    endcase
  endfunction

  initial begin
    @(posedge clk); #1 rst = 0;
    checks++;
    if (aluout !== 16'd0) begin failures++; $display("FAIL reset value %h", aluout); end
    held = aluout;
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] e;
      op = alu_op_t'($urandom % 8);
      a = 16'($urandom);
      b = 16'($urandom);
      aluout_we = ($urandom % 3) != 0;
      e = aluout_we ? model(op, a, b) : held;
      @(posedge clk); #1;
      checks++;
      if (aluout !== e) begin
        failures++;
        $display("FAIL we=%b op=%s a=%h b=%h aluout=%h exp=%h", aluout_we, op.name(), a, b, aluout, e);
      end
      held = aluout;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
