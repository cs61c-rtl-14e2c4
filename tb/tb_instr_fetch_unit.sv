// tb_instr_fetch_unit: loads a memory of random words, then drives nPC_sel,
// Zero and Jump at random every cycle and checks, cycle by cycle, the PC
// against a model of the next-address rules (PC+4, branch taken only when
// nPC_sel and Zero are both 1, jump to {PC[31:28], target, 00}) and the
// fetched instruction against the memory contents. One instruction address
// per clock cycle.
module tb_instr_fetch_unit;
  localparam int unsigned WORDS = 256;
  logic        clk = 0, rst, npc_sel, zero, jump, prog_we;
  logic [7:0]  prog_addr;
  logic [31:0] prog_data, pc, instr;
  logic [31:0] mem [WORDS];
  logic [31:0] exp_pc;
  int          checks = 0, failures = 0;
  int          n_seq = 0, n_br_taken = 0, n_br_not = 0, n_jump = 0;

  instr_fetch_unit #(.IMEM_WORDS(WORDS), .RESET_PC(32'h0000_0040)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; npc_sel = 0; zero = 0; jump = 0; prog_we = 0; prog_addr = 0; prog_data = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i);
      // small branch offsets and jump targets keep the PC mostly in range
      prog_data = {6'($urandom), 10'($urandom), 16'($urandom_range(0, 40)) - 16'd20};
      if (i % 3 == 0) prog_data[25:0] = 26'($urandom_range(0, WORDS - 1));
      mem[i] = prog_data;
    end
    @(negedge clk); prog_we = 0;
    @(posedge clk); #1; rst = 0;
    exp_pc = 32'h0000_0040;
    for (int c = 0; c < 20000; c++) begin
      logic [31:0] seq, nxt;
      @(negedge clk);
      npc_sel = $urandom % 2; zero = $urandom % 2; jump = ($urandom % 5) == 0;
      #1;
      checks++;
      if (pc !== exp_pc || instr !== mem[exp_pc[9:2]]) begin
        failures++;
        if (failures < 10) $display("FAIL pc=%h exp=%h instr=%h exp=%h", pc, exp_pc, instr, mem[exp_pc[9:2]]);
      end
      seq = exp_pc + 4;
      if (npc_sel && zero) begin
        nxt = seq + 32'(signed'(instr[15:0])) * 4;
      end else begin
        nxt = seq;
      end
      if (jump) begin
        nxt = {exp_pc[31:28], instr[25:0], 2'b00};
        n_jump++;
      end else if (npc_sel && zero) n_br_taken++;
      else if (npc_sel) n_br_not++;
      else n_seq++;
      @(posedge clk);
      exp_pc = nxt;
    end
    checks++;
    if (n_seq == 0 || n_br_taken == 0 || n_br_not == 0 || n_jump == 0) begin
      failures++;
      $display("FAIL a next-address case never happened");
    end
    $display("sequential=%0d branch_taken=%0d branch_not_taken=%0d jump=%0d",
             n_seq, n_br_taken, n_br_not, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
