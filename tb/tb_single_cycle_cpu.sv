// tb_single_cycle_cpu: end-to-end test of the CPU at its default sizes.
//
// Part 0 clears the data memory with a store loop and checks that it takes
// exactly 4097 cycles, one instruction per cycle.
// Part 1 runs a small program that sums 10..1 in a loop (ori, add, sub, sw,
// beq, j, lw, a write to register 0) and checks the stored partial sums, the
// loaded result, that register 0 stays 0 and that the program ends after
// exactly 67 cycles.
// Part 2 loads random programs of the seven instructions (plus words that
// are no instruction of the subset) and compares the CPU, every cycle, with
// an instruction-level reference model: PC, instruction, register write
// (enable, address, data) and memory write (enable, address, data); the
// register file is checked through the operands later instructions read. It counts how often each mechanism
// occurred (each instruction, beq taken and not taken, a jump while Zero is
// 1, a write to register 0, a load of a word stored earlier, an undecoded
// word) and fails if any never did.
module tb_single_cycle_cpu;
  import cpu_pkg::*;

  localparam int unsigned IW = 1024;
  localparam int unsigned DW = 1024;

  logic        clk = 0, rst, prog_we;
  logic [9:0]  prog_addr;
  logic [31:0] prog_data, pc, instr;
  ctrl_t       ctrl;
  logic        zero, reg_wr, mem_wr;
  logic [4:0]  reg_waddr;
  logic [31:0] reg_wdata, mem_addr, mem_wdata;

  single_cycle_cpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // reference model state
  logic [31:0] m_pc;
  logic [31:0] m_reg [32];
  logic [31:0] m_dmem [DW];
  logic [31:0] m_imem [IW];
  bit          m_stored [DW];

  typedef enum int {
    EV_ADD, EV_SUB, EV_ORI, EV_LW, EV_SW, EV_BEQ_TAKEN, EV_BEQ_NOT_TAKEN,
    EV_JUMP, EV_JUMP_ZERO, EV_WRITE_R0, EV_LOAD_STORED, EV_UNDECODED, EV_COUNT
  } event_e;
  int ev [EV_COUNT];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] enc_r(input logic [4:0] rs, rt, rd, input logic [5:0] fn);
    return {6'b000000, rs, rt, rd, 5'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(input logic [5:0] op, input logic [4:0] rs, rt,
                                        input logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction
  function automatic logic [31:0] enc_j(input logic [25:0] target);
    return {6'b000010, target};
  endfunction

  task automatic expect32(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h (pc=%h)", what, got, exp, m_pc);
    end
  endtask

  task automatic load_program(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(i); prog_data = m_imem[i];
    end
    @(negedge clk); prog_we = 0;
  endtask

  // Loads m_imem[0..n-1] with the CPU held in reset, then releases reset.
  // Data memory keeps its contents across reset, in the CPU and the model.
  task automatic start_program(input int n);
    @(negedge clk); rst = 1;
    load_program(n);
    @(posedge clk); #1; rst = 0;
    m_pc = 0;
    foreach (m_reg[i]) m_reg[i] = 0;
  endtask

  // One instruction of the reference model; compares the CPU's outputs for
  // this cycle with what the instruction must do, then updates the model.
  task automatic step_and_compare;
    logic [31:0] w, a, b, sx, zx, nxt, addr, wdata;
    logic [4:0]  rs, rt, rd;
    logic        we, me;
    logic [4:0]  wreg;
    w  = m_imem[m_pc[11:2]];
    rs = w[25:21]; rt = w[20:16]; rd = w[15:11];
    a  = m_reg[rs]; b = m_reg[rt];
    sx = {{16{w[15]}}, w[15:0]}; zx = {16'h0, w[15:0]};
    nxt = m_pc + 4; we = 0; me = 0; wreg = 0; wdata = 0; addr = 0;
    unique casez ({w[31:26], w[5:0]})
      12'b000000_100000: begin we = 1; wreg = rd; wdata = a + b; ev[EV_ADD]++; end
      12'b000000_100010: begin we = 1; wreg = rd; wdata = a - b; ev[EV_SUB]++; end
      12'b001101_??????: begin we = 1; wreg = rt; wdata = a | zx; ev[EV_ORI]++; end
      12'b100011_??????: begin
        addr = a + sx; we = 1; wreg = rt; wdata = m_dmem[addr[11:2]]; ev[EV_LW]++;
        if (m_stored[addr[11:2]]) ev[EV_LOAD_STORED]++;
      end
      12'b101011_??????: begin addr = a + sx; me = 1; ev[EV_SW]++; end
      12'b000100_??????: begin
        if (a == b) begin nxt = m_pc + 4 + (sx << 2); ev[EV_BEQ_TAKEN]++; end
        else ev[EV_BEQ_NOT_TAKEN]++;
      end
      12'b000010_??????: begin
        nxt = {m_pc[31:28], w[25:0], 2'b00}; ev[EV_JUMP]++;
        if (zero) ev[EV_JUMP_ZERO]++;
      end
      default: ev[EV_UNDECODED]++;
    endcase
    if (we && wreg == 0) ev[EV_WRITE_R0]++;

    expect32("pc", pc, m_pc);
    expect32("instr", instr, w);
    expect32("reg_wr", 32'(reg_wr), 32'(we));
    if (we) begin
      expect32("reg_waddr", 32'(reg_waddr), 32'(wreg));
      expect32("reg_wdata", reg_wdata, wdata);
    end
    expect32("mem_wr", 32'(mem_wr), 32'(me));
    if (me) begin
      expect32("mem_addr", mem_addr, addr);
      expect32("mem_wdata", mem_wdata, b);
    end

    if (we && wreg != 0) m_reg[wreg] = wdata;
    if (me) begin
      m_dmem[addr[11:2]] = b;
      m_stored[addr[11:2]] = 1;
    end
    m_pc = nxt;
  endtask

  function automatic logic [31:0] random_instr(input int at);
    logic [4:0] rs, rt, rd;
    int         k;
    rs = 5'($urandom % 8); rt = 5'($urandom % 8); rd = 5'($urandom % 8);
    k = int'($urandom % 100);
    if (k < 14)      return enc_r(rs, rt, rd, 6'h20);
    else if (k < 24) return enc_r(rs, rt, rd, 6'h22);
    else if (k < 44) return enc_i(6'h0d, rs, rt, 16'($urandom));
    else if (k < 58) return enc_i(6'h23, rs, rt, 16'($urandom_range(0, 64)) - 16'd32);
    else if (k < 72) return enc_i(6'h2b, rs, rt, 16'($urandom_range(0, 64)) - 16'd32);
    else if (k < 88) return enc_i(6'h04, rs, rt, 16'($urandom_range(0, 6)));
    else if (k < 96) begin
      logic [25:0] t;
      t = {16'($urandom), 10'($urandom_range(0, 1023))};
      if (t[9:0] == 10'(at)) t[9:0] = t[9:0] + 10'd1;
      return enc_j(t);
    end
    else             return {6'($urandom_range(5, 12)), 26'($urandom)};
  endfunction

  initial begin
    int cycles, stores, sum;
    rst = 1; prog_we = 0; prog_addr = 0; prog_data = 0;
    foreach (ev[i]) ev[i] = 0;

    // ---- Part 0: clear the data memory with a store loop ----------------
    foreach (m_dmem[i]) m_dmem[i] = 0;
    foreach (m_imem[i]) m_imem[i] = 32'h0;
    m_imem[0] = enc_i(6'h0d, 0, 1, 16'h1000);     // ori r1, r0, 0x1000
    m_imem[1] = enc_i(6'h0d, 0, 4, 16'd4);        // ori r4, r0, 4
    m_imem[2] = enc_r(1, 4, 1, 6'h22);            // loop: sub r1, r1, r4
    m_imem[3] = enc_i(6'h2b, 1, 0, 16'd0);        // sw  r0, 0(r1)
    m_imem[4] = enc_i(6'h04, 1, 0, 16'd1);        // beq r1, r0, +1
    m_imem[5] = enc_j(26'd2);                     // j loop
    m_imem[6] = enc_j(26'd6);                     // done: j done
    start_program(IW);
    cycles = 0; stores = 0;
    while (pc != 32'd24 && cycles < 10000) begin
      @(negedge clk);
      if (mem_wr) stores++;
      step_and_compare();
      @(posedge clk); #1;
      cycles++;
    end
    // 2 setup instructions, 1023 passes of 4, a last pass of 3
    expect32("clear loop cycles", 32'(cycles), 32'd4097);
    expect32("clear loop stores", 32'(stores), 32'(DW));
    foreach (m_stored[i]) m_stored[i] = 0;

    // ---- Part 1: sum of 10..1 -------------------------------------------
    foreach (m_imem[i]) m_imem[i] = 32'h0;
    m_imem[0]  = enc_i(6'h0d, 0, 1, 16'd10);      // ori r1, r0, 10   n
    m_imem[1]  = enc_i(6'h0d, 0, 2, 16'd0);       // ori r2, r0, 0    sum
    m_imem[2]  = enc_i(6'h0d, 0, 3, 16'd1);       // ori r3, r0, 1
    m_imem[3]  = enc_i(6'h0d, 0, 4, 16'h0100);    // ori r4, r0, 0x100 pointer
    m_imem[4]  = enc_i(6'h0d, 0, 5, 16'd4);       // ori r5, r0, 4
    m_imem[5]  = enc_r(2, 1, 2, 6'h20);           // loop: add r2, r2, r1
    m_imem[6]  = enc_i(6'h2b, 4, 2, 16'd0);       // sw  r2, 0(r4)
    m_imem[7]  = enc_r(4, 5, 4, 6'h20);           // add r4, r4, r5
    m_imem[8]  = enc_r(1, 3, 1, 6'h22);           // sub r1, r1, r3
    m_imem[9]  = enc_i(6'h04, 1, 0, 16'd1);       // beq r1, r0, +1
    m_imem[10] = enc_j(26'd5);                    // j loop
    m_imem[11] = enc_i(6'h23, 4, 6, 16'hfffc);    // lw  r6, -4(r4)
    m_imem[12] = enc_r(6, 6, 0, 6'h20);           // add r0, r6, r6
    m_imem[13] = enc_r(0, 6, 7, 6'h20);           // add r7, r0, r6
    m_imem[14] = enc_j(26'd14);                   // done: j done
    start_program(IW);
    cycles = 0; stores = 0; sum = 0;
    while (pc != 32'd56 && cycles < 1000) begin
      @(negedge clk);
      if (mem_wr) begin
        sum += 10 - stores;
        expect32("stored address", mem_addr, 32'h0100 + 32'(4 * stores));
        expect32("stored partial sum", mem_wdata, 32'(sum));
        stores++;
      end
      if (pc == 32'd44) expect32("lw r6 = 55", reg_wdata, 32'd55);
      if (pc == 32'd48) expect32("add writes r0", 32'(reg_waddr), 32'd0);
      if (pc == 32'd52) expect32("r0 still reads 0", reg_wdata, 32'd55);
      step_and_compare();
      @(posedge clk); #1;
      cycles++;
    end
    // 5 setup instructions, 9 passes of 6, a last pass of 5, lw, 2 adds
    expect32("cycles to finish", 32'(cycles), 32'd67);
    expect32("partial sums stored", 32'(stores), 32'd10);
    repeat (3) begin
      @(negedge clk); step_and_compare(); @(posedge clk); #1;
    end
    expect32("pc stays at done", pc, 32'd56);
    $display("loop program: %0d cycles", cycles);

    // ---- Part 2: random programs against the reference model -----------
    for (int p = 0; p < 12; p++) begin
      for (int i = 0; i < IW; i++) m_imem[i] = random_instr(i);
      start_program(IW);
      for (int c = 0; c < 2000; c++) begin
        @(negedge clk);
        step_and_compare();
        @(posedge clk); #1;
      end
    end

    for (int e = 0; e < EV_COUNT; e++) begin
      $display("%-18s %0d", event_e'(e), ev[e]);
      checks++;
      if (ev[e] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", event_e'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
