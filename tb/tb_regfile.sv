// tb_regfile: self-checking test of the register file.
// Checks reset to zero, that R0 reads zero and ignores writes, write
// enable, and random writes/reads on both read ports against a shadow copy.
module tb_regfile;
  logic        clk = 0, rst;
  logic [2:0]  ra1, ra2, wa;
  logic [15:0] rd1, rd2, wd;
  logic        we;
  logic [15:0] shadow [8];
  int          checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  task automatic cmp(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 8; r++) begin
      shadow[r] = 0;
      ra1 = 3'(r); ra2 = 3'(7 - r); #1;
      cmp(rd1, 16'h0, "reset rd1");
      cmp(rd2, 16'h0, "reset rd2");
    end
    // write to R0 is ignored
    we = 1; wa = 0; wd = 16'hbeef; @(posedge clk); #1;
    ra1 = 0; #1 cmp(rd1, 16'h0, "R0 after write");
    // write enable low
    we = 0; wa = 3; wd = 16'h1234; @(posedge clk); #1;
    ra1 = 3; #1 cmp(rd1, 16'h0, "R3 with we=0");
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); wa = 3'($urandom); wd = 16'($urandom);
      ra1 = 3'($urandom); ra2 = 3'($urandom);
      #1;
      cmp(rd1, shadow[ra1], "rd1");
      cmp(rd2, shadow[ra2], "rd2");
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      #1;
    end
    // reset clears everything
    rst = 1; @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 8; r++) begin
      ra1 = 3'(r); #1 cmp(rd1, 16'h0, "second reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
