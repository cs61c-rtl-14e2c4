// tb_regfile: random writes and reads on both ports checked against an array
// model; register 0 must read as zero, a write is visible from the next
// cycle, and reset clears every register.
module tb_regfile;
  logic        clk = 0, rst;
  logic [4:0]  ra, rb, rw;
  logic [31:0] busw, busa, busb;
  logic        reg_wr;
  logic [31:0] model [32];
  int          checks = 0, failures = 0;

  regfile #(.WIDTH(32), .NREGS(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read;
    checks++;
    if (busa !== model[ra] || busb !== model[rb]) begin
      failures++;
      $display("FAIL ra=%0d busa=%h exp=%h rb=%0d busb=%h exp=%h", ra, busa, model[ra], rb, busb, model[rb]);
    end
  endtask

  initial begin
    rst = 1; reg_wr = 0; ra = 0; rb = 0; rw = 0; busw = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1; check_read();
    end
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      ra = 5'($urandom); rb = 5'($urandom); rw = 5'($urandom);
      if (c % 7 == 0) rw = 0;
      busw = $urandom; reg_wr = ($urandom % 3) != 0;
      #1; check_read();
      @(posedge clk);
      if (reg_wr && rw != 0) model[rw] = busw;
      #1; ra = rw; #1; check_read();
    end
    // reset clears everything
    @(negedge clk); reg_wr = 0; rst = 1;
    @(posedge clk); #1; rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(i); #1; check_read();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
