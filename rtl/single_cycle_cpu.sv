// single_cycle_cpu: a single-cycle CPU for the MIPS subset add, sub, ori,
// lw, sw, beq and j.
//
// Every instruction takes exactly one clock cycle: the fetch unit presents
// the instruction at PC, the controller decodes its op and func fields into
// control points, the datapath reads registers, computes, reads or writes
// data memory and produces the register write data, and at the rising edge
// the PC, the register file and the data memory are all updated together.
// The ALU's Zero flows back to the fetch unit to resolve beq in the same
// cycle. Instruction fields: op <31:26>, rs <25:21>, rt <20:16>, rd <15:11>,
// func <5:0>, imm16 <15:0>, target <25:0>.
//
// The instruction memory has a program load port; the debug outputs report,
// for the instruction being executed this cycle, its PC and encoding and any
// register or memory write it will perform at the next edge. Reset is
// synchronous and active high: PC goes to RESET_PC and the registers to 0.
module single_cycle_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic                          clk,
  input  logic                          rst,
  // program load port of the instruction memory
  input  logic                          prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] prog_addr,
  input  logic [31:0]                   prog_data,
  // execution trace of the current cycle
  output logic [31:0]                   pc,
  output logic [31:0]                   instr,
  output ctrl_t                         ctrl,
  output logic                          zero,
  output logic                          reg_wr,
  output logic [4:0]                    reg_waddr,
  output logic [31:0]                   reg_wdata,
  output logic                          mem_wr,
  output logic [31:0]                   mem_addr,
  output logic [31:0]                   mem_wdata
);

  logic [31:0] alu_out, busb;

  instr_fetch_unit #(.IMEM_WORDS(IMEM_WORDS), .RESET_PC(RESET_PC)) u_ifu (
    .clk       (clk),
    .rst       (rst),
    .npc_sel   (ctrl.npc_sel),
    .zero      (zero),
    .jump      (ctrl.jump),
    .pc        (pc),
    .instr     (instr),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_data (prog_data)
  );

  main_control u_ctrl (
    .op   (instr[31:26]),
    .func (instr[5:0]),
    .ctrl (ctrl)
  );

  datapath #(.DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk         (clk),
    .rst         (rst),
    .rs          (instr[25:21]),
    .rt          (instr[20:16]),
    .rd          (instr[15:11]),
    .imm16       (instr[15:0]),
    .ctrl        (ctrl),
    .zero        (zero),
    .dbg_rw      (reg_waddr),
    .dbg_busw    (reg_wdata),
    .dbg_alu_out (alu_out),
    .dbg_busb    (busb)
  );

  always_comb begin
    reg_wr    = ctrl.reg_wr;
    mem_wr    = ctrl.mem_wr;
    mem_addr  = alu_out;
    mem_wdata = busb;
  end

endmodule
