// tb_inst_memory: loads random words through the program port and reads them
// back by byte address, including addresses whose upper bits wrap.
module tb_inst_memory;
  localparam int unsigned WORDS = 128;
  logic        clk = 0, prog_we;
  logic [6:0]  prog_addr;
  logic [31:0] addr, instr, prog_data;
  logic [31:0] model [WORDS];
  int          checks = 0, failures = 0;

  inst_memory #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_we = 0; prog_addr = 0; prog_data = 0; addr = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 7'(i); prog_data = $urandom; model[i] = prog_data;
    end
    @(negedge clk); prog_we = 0;
    for (int c = 0; c < 2000; c++) begin
      addr = {$urandom} & ~32'h3;
      if (c < WORDS) addr = 32'(c * 4);
      #1;
      checks++;
      if (instr !== model[addr[8:2]]) begin
        failures++;
        $display("FAIL addr=%h instr=%h exp=%h", addr, instr, model[addr[8:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
