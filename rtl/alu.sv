// alu: the 32-bit ALU of the single-cycle datapath.
//
// It adds, subtracts or ORs its two operands as ALUctr selects (00 ADD,
// 01 SUB, 10 OR, the controller's encoding) and raises Zero when the result
// is all zeros; beq uses SUB so that Zero means R[rs] == R[rt]. Additions
// wrap modulo 2^32 with no overflow signal, and code 11 gives 0: both are
// this design's choices. Combinational.
//
// Ports: a = busA, b = busB or the extended immediate, alu_ctr, result, zero.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_ctr_e         alu_ctr,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
