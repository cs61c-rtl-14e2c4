// tb_datapath: drives the datapath with the control settings of add, sub,
// ori, lw, sw and beq (taken from the control table, not from the
// controller) and random register numbers and immediates, and checks the
// register write address and data, the ALU result, busB and Zero against a
// model of each instruction's register transfer. Register and memory
// contents are checked through later reads (busA/busB, lw data). The data
// memory is first cleared with a run of sw instructions.
module tb_datapath;
  import cpu_pkg::*;

  localparam int unsigned DW = 64;
  logic        clk = 0, rst;
  logic [4:0]  rs, rt, rd;
  logic [15:0] imm16;
  ctrl_t       ctrl;
  logic        zero;
  logic [4:0]  dbg_rw;
  logic [31:0] dbg_busw, dbg_alu_out, dbg_busb;
  logic [31:0] regs [32];
  logic [31:0] mem [DW];
  int          checks = 0, failures = 0;
  int          n_kind [6];

  datapath #(.DMEM_WORDS(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // RegDst ALUSrc MemtoReg RegWr MemWr nPCsel Jump ExtOp ALUctr
  function automatic ctrl_t ctrl_of(input int k);
    case (k)
      0: return '{1, 0, 0, 1, 0, 0, 0, 0, ALU_ADD};  // add
      1: return '{1, 0, 0, 1, 0, 0, 0, 0, ALU_SUB};  // sub
      2: return '{0, 1, 0, 1, 0, 0, 0, 0, ALU_OR};   // ori
      3: return '{0, 1, 1, 1, 0, 0, 0, 1, ALU_ADD};  // lw
      4: return '{0, 1, 0, 0, 1, 0, 0, 1, ALU_ADD};  // sw
      default: return '{0, 0, 0, 0, 0, 1, 0, 0, ALU_SUB};  // beq
    endcase
  endfunction

  task automatic expect32(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; rs = 0; rt = 0; rd = 0; imm16 = 0; ctrl = '0;
    @(posedge clk); #1; rst = 0;
    foreach (regs[i]) regs[i] = 0;
    // clear the data memory with sw r0, 4*i(r0)
    for (int i = 0; i < DW; i++) begin
      @(negedge clk);
      ctrl = ctrl_of(4); rs = 0; rt = 0; imm16 = 16'(4 * i);
      #1;
      expect32("clear address", dbg_alu_out, 32'(4 * i));
      mem[i] = 0;
    end
    for (int c = 0; c < 20000; c++) begin
      int          k;
      logic [31:0] a, b, ext, res, wdata;
      logic [4:0]  wreg;
      @(negedge clk);
      k = (c < 200) ? 2 : int'($urandom % 6);  // start with ori to fill registers
      ctrl = ctrl_of(k);
      rs = 5'($urandom % 8); rt = 5'($urandom % 8); rd = 5'($urandom % 8);
      imm16 = $urandom;
      if (k == 3 || k == 4) imm16 = 16'($urandom_range(0, 600)) - 16'd300;
      #1;
      a = regs[rs]; b = regs[rt];
      ext = (k == 2) ? {16'h0, imm16} : {{16{imm16[15]}}, imm16};
      case (k)
        0: res = a + b;
        1, 5: res = a - b;
        2: res = a | ext;
        default: res = a + ext;
      endcase
      wdata = (k == 3) ? mem[res[7:2]] : res;
      wreg = (k <= 1) ? rd : rt;
      expect32("alu_out", dbg_alu_out, res);
      expect32("busB", dbg_busb, b);
      expect32("zero", 32'(zero), 32'(res == 0));
      if (k <= 3) begin
        expect32("rw", 32'(dbg_rw), 32'(wreg));
        expect32("busW", dbg_busw, wdata);
      end
      n_kind[k]++;
      @(posedge clk);
      if (k <= 3 && wreg != 0) regs[wreg] = wdata;
      if (k == 4) mem[res[7:2]] = b;
      #1;
    end
    $display("add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq=%0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_kind[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
