// tb_extender: checks zero and sign extension of the 16-bit immediate for
// every possible immediate value.
module tb_extender;
  logic [15:0] imm16;
  logic        ext_op;
  logic [31:0] imm32;
  int          checks = 0, failures = 0;

  extender dut (.imm16(imm16), .ext_op(ext_op), .imm32(imm32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      for (int s = 0; s < 2; s++) begin
        int signed expi;
        imm16 = 16'(v); ext_op = s[0];
        #1;
        // sign: value as a signed 16-bit number; zero: value as unsigned
        expi = s[0] ? ((v >= 32768) ? v - 65536 : v) : v;
        checks++;
        if (imm32 !== 32'(expi)) begin
          failures++;
          if (failures < 10) $display("FAIL imm16=%h ext_op=%0d imm32=%h", imm16, s, imm32);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
