// instr_fetch_unit: PC register, next-address logic and instruction memory.
//
// Each cycle the instruction at PC is read from the instruction memory and
// the next PC is chosen, then loaded at the rising clock edge:
//   - PC + 4, normally;
//   - PC + 4 + SignExt(imm16)*4 (the "PC Ext" block shifts the sign-extended
//     offset left by two), when nPC_sel = 1 (a branch) and the ALU's Zero is
//     1: the mux select is the AND of nPC_sel and Zero, the truth table
//     nPC_sel/zero -> MUX (0 x -> 0, 1 0 -> 0, 1 1 -> 1);
//   - {PC[31:28], target<25:0>, 00} when Jump = 1; this second mux sits after
//     the branch mux and overrides it, so Zero and nPC_sel do not matter.
// The two lowest PC bits are always 00 and are not stored. On reset (rst,
// synchronous, active high) PC is loaded with RESET_PC, this design's choice.
// The jump target's upper bits come from PC itself, not PC + 4, as the
// lecture gives it.
//
// Ports: clk, rst, npc_sel, zero, jump (control), pc (instruction address),
// instr (Instruction<31:0>), prog_* (program load port of the memory).
module instr_fetch_unit #(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          npc_sel,
  input  logic                          zero,
  input  logic                          jump,
  output logic [31:0]                   pc,
  output logic [31:0]                   instr,
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] prog_addr,
  input  logic [31:0]                   prog_data
);

  logic [31:2] pc_q;
  logic [31:0] pc_plus4, pc_ext, br_target, seq_pc, jump_target, next_pc;
  logic        mux_ctrl;

  always_comb begin
    pc          = {pc_q, 2'b00};
    pc_plus4    = pc + 32'd4;
    pc_ext      = {{14{instr[15]}}, instr[15:0], 2'b00};
    br_target   = pc_plus4 + pc_ext;
    mux_ctrl    = npc_sel & zero;
    seq_pc      = mux_ctrl ? br_target : pc_plus4;
    jump_target = {pc[31:28], instr[25:0], 2'b00};
    next_pc     = jump ? jump_target : seq_pc;
  end

  always_ff @(posedge clk) begin
    if (rst) pc_q <= RESET_PC[31:2];
    else     pc_q <= next_pc[31:2];
  end

  inst_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk       (clk),
    .addr      (pc),
    .instr     (instr),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_data (prog_data)
  );

endmodule
