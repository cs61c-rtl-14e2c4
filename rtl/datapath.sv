// datapath: register file, extender, ALU, data memory and their three muxes.
//
// For the instruction currently fetched, the register file reads R[rs] onto
// busA and R[rt] onto busB. The ALU's second operand is busB (ALUSrc = 0) or
// imm16 zero/sign-extended by ExtOp (ALUSrc = 1). The ALU result is the data
// memory address; busB is its Data In, written when MemWr = 1. busW is the
// ALU result (MemtoReg = 0) or the memory's Data Out (MemtoReg = 1) and is
// written at the clock edge into R[rd] (RegDst = 1) or R[rt] (RegDst = 0)
// when RegWr = 1. The ALU's Zero goes back to the fetch unit for beq. The
// structure and the mux encodings are the lecture's; the memory size, and
// blocking memory writes while rst is high, are this design's choices. Everything is combinational from the instruction fields to
// the register and memory writes at the rising edge of clk.
//
// Ports: clk, rst (clears the registers), rs/rt/rd/imm16 (instruction
// fields), ctrl (control points), zero (to the fetch unit); the dbg_* outputs
// show the register and memory writes of the cycle.
module datapath
  import cpu_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  rs,
  input  logic [4:0]  rt,
  input  logic [4:0]  rd,
  input  logic [15:0] imm16,
  input  ctrl_t       ctrl,
  output logic        zero,
  output logic [4:0]  dbg_rw,
  output logic [31:0] dbg_busw,
  output logic [31:0] dbg_alu_out,
  output logic [31:0] dbg_busb
);

  logic [4:0]  rw;
  logic [31:0] busa, busb, busw, imm32, alu_b, alu_out, dmem_out;

  always_comb begin
    rw    = ctrl.reg_dst ? rd : rt;
    alu_b = ctrl.alu_src ? imm32 : busb;
    busw  = ctrl.mem_to_reg ? dmem_out : alu_out;
  end

  regfile #(.WIDTH(32), .NREGS(32)) u_rf (
    .clk    (clk),
    .rst    (rst),
    .ra     (rs),
    .rb     (rt),
    .rw     (rw),
    .busw   (busw),
    .reg_wr (ctrl.reg_wr),
    .busa   (busa),
    .busb   (busb)
  );

  extender u_ext (
    .imm16  (imm16),
    .ext_op (ctrl.ext_op),
    .imm32  (imm32)
  );

  alu #(.WIDTH(32)) u_alu (
    .a       (busa),
    .b       (alu_b),
    .alu_ctr (ctrl.alu_ctr),
    .result  (alu_out),
    .zero    (zero)
  );

  data_memory #(.WIDTH(32), .WORDS(DMEM_WORDS)) u_dmem (
    .clk      (clk),
    .wr_en    (ctrl.mem_wr & ~rst),
    .adr      (alu_out),
    .data_in  (busb),
    .data_out (dmem_out)
  );

  always_comb begin
    dbg_rw      = rw;
    dbg_busw    = busw;
    dbg_alu_out = alu_out;
    dbg_busb    = busb;
  end

endmodule
