// tb_main_control: applies all 4096 op/func pairs and compares the control
// signals with the controller truth table (one column per instruction, "x"
// entries not checked). Pairs that are no instruction of the subset must
// write neither a register nor memory and must not redirect the PC.
module tb_main_control;
  import cpu_pkg::*;

  logic [5:0] op, func;
  ctrl_t      ctrl;
  int         checks = 0, failures = 0;
  int         decoded = 0;

  main_control dut (.op(op), .func(func), .ctrl(ctrl));

  // Truth table columns: RegDst ALUSrc MemtoReg RegWrite MemWrite nPCsel Jump ExtOp
  function automatic string column(input int k);
    case (k)
      0: return "1001000x";  // add
      1: return "1001000x";  // sub
      2: return "01010000";  // ori
      3: return "01110001";  // lw
      4: return "x1x01001";  // sw
      5: return "x0x0010x";  // beq
      default: return "xxx00x1x";  // jump
    endcase
  endfunction

  function automatic string aluop(input int k);
    case (k)
      0: return "ADD";
      1: return "SUB";
      2: return "OR";
      3: return "ADD";
      4: return "ADD";
      5: return "SUB";
      default: return "x";
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        int    k;
        logic [7:0] got;
        string col;
        op = 6'(o); func = 6'(f);
        #1;
        k = -1;
        if (o == 0 && f == 'h20) k = 0;
        else if (o == 0 && f == 'h22) k = 1;
        else if (o == 'h0d) k = 2;
        else if (o == 'h23) k = 3;
        else if (o == 'h2b) k = 4;
        else if (o == 'h04) k = 5;
        else if (o == 'h02) k = 6;
        got = {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_wr,
               ctrl.mem_wr, ctrl.npc_sel, ctrl.jump, ctrl.ext_op};
        if (k < 0) begin
          checks++;
          if (ctrl.reg_wr || ctrl.mem_wr || ctrl.npc_sel || ctrl.jump) begin
            failures++;
            $display("FAIL op=%b func=%b is no instruction but ctrl=%b", op, func, got);
          end
          continue;
        end
        decoded++;
        col = column(k);
        for (int i = 0; i < 8; i++) begin
          if (col[i] == "x") continue;
          checks++;
          if (got[7-i] !== (col[i] == "1")) begin
            failures++;
            $display("FAIL op=%b func=%b signal %0d got %b exp %s", op, func, i, got[7-i], col[i]);
          end
        end
        if (aluop(k) != "x") begin
          checks++;
          if ((aluop(k) == "ADD" && ctrl.alu_ctr != ALU_ADD) ||
              (aluop(k) == "SUB" && ctrl.alu_ctr != ALU_SUB) ||
              (aluop(k) == "OR"  && ctrl.alu_ctr != ALU_OR)) begin
            failures++;
            $display("FAIL op=%b func=%b ALUctr=%b exp %s", op, func, ctrl.alu_ctr, aluop(k));
          end
        end
      end
    end
    // add and sub: 1 func each; ori, lw, sw, beq, j: every func
    checks++;
    if (decoded != 2 + 5 * 64) begin
      failures++;
      $display("FAIL %0d op/func pairs decoded", decoded);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
