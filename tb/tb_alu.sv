// tb_alu: exercises every ALU operation with directed values (including the
// arithmetic examples of the instruction set) and random operands, comparing
// with a reference written with integer arithmetic.
module tb_alu;
  import acc_pkg::*;
  alu_op_t     op;
  logic [15:0] a, b, y;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y, .zero);

  function automatic logic [15:0] ref_y(alu_op_t o, logic [15:0] x, logic [15:0] z);
    int sx, sz;
    sx = int'($signed(x));
    sz = int'($signed(z));
    case (o)
      ALU_ADD:   return 16'(sx + sz);
      ALU_SUB:   return 16'(sx - sz);
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_CMPE:  return (x == z) ? 16'd1 : 16'd0;
      ALU_CMPLT: return (sx < sz) ? 16'd1 : 16'd0;
      ALU_SL:    return 16'((32'(x) * (1 << (z % 16))) & 32'hFFFF);
      ALU_SR:    return 16'(32'(x) / (1 << (z % 16)));
      default:   return 16'd0;
    endcase
  endfunction

  task automatic check(alu_op_t o, logic [15:0] x, logic [15:0] z);
    logic [15:0] e;
    op = o; a = x; b = z;
    #1;
    e = ref_y(o, x, z);
    checks++;
    if (y !== e || zero !== (e == 16'd0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: the arithmetic sequence of the instruction examples
    check(ALU_ADD, 16'd0, 16'd5);
    check(ALU_SUB, 16'd5, 16'd2);
    check(ALU_OR, 16'd3, 16'd50);
    check(ALU_AND, 16'd51, 16'd22);
    check(ALU_CMPE, 16'd18, 16'd18);
    check(ALU_CMPLT, 16'd35, 16'd100);
    check(ALU_CMPLT, 16'd35, 16'd30);
    check(ALU_CMPLT, 16'hFFFF, 16'd0);
    check(ALU_SL, 16'd8, 16'd1);
    check(ALU_SR, 16'd16, 16'd2);
    check(ALU_SR, 16'h8000, 16'd15);
    for (int i = 0; i < 4000; i++) begin
      alu_op_t o;
      o = alu_op_t'(i % 8);
      check(o, 16'($urandom), (i % 16 < 4) ? 16'($urandom % 16) : 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
