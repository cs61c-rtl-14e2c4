// tb_alu: checks the ALU's ADD, SUB and OR results and its Zero flag against
// SystemVerilog's own operators, for directed corner values and random
// operands.
module tb_alu;
  import cpu_pkg::*;

  logic [31:0] a, b, result;
  alu_ctr_e    alu_ctr;
  logic        zero;
  int          checks = 0, failures = 0;

  alu #(.WIDTH(32)) dut (.a(a), .b(b), .alu_ctr(alu_ctr), .result(result), .zero(zero));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input alu_ctr_e op);
    logic [31:0] exp;
    a = ta; b = tb_; alu_ctr = op;
    #1;
    case (op)
      ALU_ADD: exp = ta + tb_;
      ALU_SUB: exp = ta - tb_;
      default: exp = ta | tb_;
    endcase
    checks++;
    if (result !== exp || zero !== (exp == 32'd0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h result=%h zero=%b exp=%h", op.name(), ta, tb_, result, zero, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'd5, 32'd5, ALU_SUB);            // beq equal operands: Zero
    check(32'd5, 32'd6, ALU_SUB);
    check(32'hFFFF_FFFF, 32'd1, ALU_ADD);     // wraps to 0, Zero
    check(32'h8000_0000, 32'h8000_0000, ALU_ADD);
    check(32'h0, 32'h0, ALU_OR);
    check(32'h1234_0000, 32'h0000_5678, ALU_OR);
    check(32'd0, 32'd1, ALU_SUB);
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] ra, rb;
      ra = $urandom; rb = (i % 4 == 0) ? ra : $urandom;
      check(ra, rb, alu_ctr_e'(i % 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
