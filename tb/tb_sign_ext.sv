// tb_sign_ext: checks the sign extender on all 1024 immediates, positive and
// negative, against integer arithmetic.
module tb_sign_ext;
  logic [9:0]  in;
  logic [15:0] out;
  int checks = 0, failures = 0;

  sign_ext #(.IN_W(10), .OUT_W(16)) dut (.in, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -512; v < 512; v++) begin
      in = 10'(v);
      #1;
      checks++;
      if (out !== 16'(v)) begin
        failures++;
        $display("FAIL in=%0d out=%h", v, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
