// data_memory: the "ideal" data memory of the single-cycle datapath.
//
// Data Out = MEM[Adr] is read combinationally within the cycle (lw); when
// WrEn is 1, Data In is written to MEM[Adr] at the rising clock edge (sw).
// The memory is word-addressed by Adr<WORDS_LOG2+1:2>: the two lowest bits
// are ignored and higher bits wrap around. Its size and the addressing are
// this design's choices. Contents are not reset.
//
// Ports: clk, wr_en, adr (byte address), data_in, data_out.
module data_memory #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned WORDS = 1024
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [31:0]      adr,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [WIDTH-1:0] mem [WORDS];
  logic [AW-1:0]    idx;

  always_comb idx = adr[AW+1:2];

  always_ff @(posedge clk) begin
    if (wr_en) mem[idx] <= data_in;
  end

  always_comb data_out = mem[idx];

endmodule
