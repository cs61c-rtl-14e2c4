// tb_data_memory: random word writes and reads checked against an array
// model, with the byte-address to word-index mapping (low two bits ignored,
// upper bits wrap) of a 64-word memory.
module tb_data_memory;
  localparam int unsigned WORDS = 64;
  logic        clk = 0, wr_en;
  logic [31:0] adr, data_in, data_out;
  logic [31:0] model [WORDS];
  int          checks = 0, failures = 0;

  data_memory #(.WIDTH(32), .WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1; adr = 0; data_in = 0;
    // fill every word through the write port first
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); adr = 32'(i * 4); data_in = $urandom; model[i] = data_in;
    end
    for (int c = 0; c < 4000; c++) begin
      int idx;
      @(negedge clk);
      adr = $urandom; wr_en = $urandom % 2; data_in = $urandom;
      idx = int'(adr[7:2]);
      #1;
      checks++;
      if (data_out !== model[idx]) begin
        failures++;
        $display("FAIL adr=%h out=%h exp=%h", adr, data_out, model[idx]);
      end
      @(posedge clk);
      if (wr_en) model[idx] = data_in;
      #1;
      checks++;
      if (data_out !== model[idx]) begin
        failures++;
        $display("FAIL after write adr=%h out=%h exp=%h", adr, data_out, model[idx]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
