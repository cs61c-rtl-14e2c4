// cpu_pkg: shared encodings and types of the single-cycle MIPS-subset CPU.
//
// The opcode and function-field values are those of the controller's truth
// table (add/sub share op 000000 and differ in func; ori, lw, sw, beq and j
// have their own op). The ALU control code is the two-bit one of the logic
// equations: 00 ADD, 01 SUB, 10 OR; 11 is unused by the controller.
// ctrl_t bundles the control points of the datapath and fetch unit so that
// the controller, the datapath and the top pass them as one signal.
package cpu_pkg;

  // Primary opcodes, instruction bits <31:26>
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_ORI   = 6'b001101;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_J     = 6'b000010;

  // Function field of R-type instructions, bits <5:0>
  localparam logic [5:0] FUNC_ADD = 6'b100000;
  localparam logic [5:0] FUNC_SUB = 6'b100010;

  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } alu_ctr_e;

  // Control points, named as on the datapath figures.
  typedef struct packed {
    logic     reg_dst;     // 0: Rw = rt, 1: Rw = rd
    logic     alu_src;     // 0: ALU B = busB, 1: ALU B = extended imm16
    logic     mem_to_reg;  // 0: busW = ALU result, 1: busW = data memory out
    logic     reg_wr;      // write busW into R[Rw] at the clock edge
    logic     mem_wr;      // write busB into data memory at the clock edge
    logic     npc_sel;     // 1 for a branch instruction ("br"), 0 for "+4"
    logic     jump;        // 1: next PC = {PC[31:28], target, 00}
    logic     ext_op;      // 0: zero-extend imm16, 1: sign-extend
    alu_ctr_e alu_ctr;     // ALU operation
  } ctrl_t;

endpackage
