// tb_imem: self-checking test of the instruction memory at full size.
// Loads every one of the 4096 words with a value derived from its address
// through the load port, then reads them back in a scrambled order on the
// fetch port, and checks that a later load overwrites one word only.
module tb_imem;
  logic        clk = 0;
  logic [11:0] addr, load_addr;
  logic [15:0] instr, load_data;
  logic        load_we;
  int          checks = 0, failures = 0;

  imem dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] pattern(int i);
    return 16'((i * 40503) ^ (i << 3) ^ 16'h5a5a);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_we = 0; load_addr = 0; load_data = 0; addr = 0;
    @(negedge clk);
    for (int i = 0; i < 4096; i++) begin
      load_we = 1; load_addr = 12'(i); load_data = pattern(i);
      @(negedge clk);
    end
    load_we = 0;
    for (int i = 0; i < 4096; i++) begin
      addr = 12'((i * 1237) % 4096); #1;
      checks++;
      if (instr !== pattern((i * 1237) % 4096)) begin
        failures++;
        $display("FAIL addr=%h got=%h exp=%h", addr, instr, pattern((i * 1237) % 4096));
      end
    end
    @(negedge clk);
    load_we = 1; load_addr = 12'h7ff; load_data = 16'hcafe; @(negedge clk); load_we = 0;
    addr = 12'h7ff; #1; checks++;
    if (instr !== 16'hcafe) begin failures++; $display("FAIL overwrite got=%h", instr); end
    addr = 12'h800; #1; checks++;
    if (instr !== pattern(2048)) begin failures++; $display("FAIL neighbour got=%h", instr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
