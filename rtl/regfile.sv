// regfile: 32 registers of 32 bits with two read ports and one write port.
//
// busA = R[Ra] and busB = R[Rb] are read combinationally, so an instruction
// sees its operands in the same cycle it is fetched. When RegWr is 1, busW is
// written into R[Rw] at the rising clock edge, which ends the instruction.
// Register 0 always reads as zero and ignores writes, as in the MIPS
// architecture; a synchronous reset clears all registers. Both are this
// design's choices. A register written in a cycle is read with its new value
// from the next cycle on.
//
// Ports: clk, rst (synchronous, active high), ra/rb/rw (5 bits), busw,
// reg_wr, busa, busb.
module regfile #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] ra,
  input  logic [$clog2(NREGS)-1:0] rb,
  input  logic [$clog2(NREGS)-1:0] rw,
  input  logic [WIDTH-1:0]         busw,
  input  logic                     reg_wr,
  output logic [WIDTH-1:0]         busa,
  output logic [WIDTH-1:0]         busb
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (reg_wr && rw != '0) begin
      regs[rw] <= busw;
    end
  end

  always_comb begin
    busa = (ra == '0) ? '0 : regs[ra];
    busb = (rb == '0) ? '0 : regs[rb];
  end

endmodule
