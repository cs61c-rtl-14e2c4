// inst_memory: the "ideal" instruction memory, Instruction = MEM[PC].
//
// The read is combinational, so the instruction at the current PC is
// available in the same cycle. The memory is word-addressed by
// addr<WORDS_LOG2+1:2>; higher address bits wrap around. A separate write
// port (prog_we, prog_addr, prog_data, written at the rising clock edge)
// loads a program; the CPU itself never writes here. Size, addressing and
// the load port are this design's choices.
//
// Ports: clk, addr (byte address, the PC), instr, prog_we, prog_addr (word
// index), prog_data.
module inst_memory #(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic [31:0]              addr,
  output logic [31:0]              instr,
  input  logic                     prog_we,
  input  logic [$clog2(WORDS)-1:0] prog_addr,
  input  logic [31:0]              prog_data
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  always_comb instr = mem[addr[AW+1:2]];

endmodule
