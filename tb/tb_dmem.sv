// tb_dmem: self-checking test of the data memory at full size.
// Fills all 4096 words through the host port, then mixes random processor
// reads and writes with host reads, comparing with a shadow array; also
// checks that the processor port wins a same-word write collision.
module tb_dmem;
  logic        clk = 0;
  logic [11:0] addr, host_addr;
  logic        we, host_we;
  logic [15:0] wdata, rdata, host_wdata, host_rdata;
  logic [15:0] shadow [4096];
  int          checks = 0, failures = 0;

  dmem dut (.*);

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
    we = 0; host_we = 0; addr = 0; host_addr = 0; wdata = 0; host_wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 4096; i++) begin
      host_we = 1; host_addr = 12'(i); host_wdata = 16'($urandom);
      shadow[i] = host_wdata;
      @(negedge clk);
    end
    host_we = 0;
    for (int n = 0; n < 6000; n++) begin
      addr = 12'($urandom); host_addr = 12'($urandom);
      we = 1'($urandom); wdata = 16'($urandom);
      #1;
      cmp(rdata, shadow[addr], "cpu read");
      cmp(host_rdata, shadow[host_addr], "host read");
      @(negedge clk);
      if (we) shadow[addr] = wdata;
    end
    // collision
    we = 1; host_we = 1; addr = 12'h042; host_addr = 12'h042;
    wdata = 16'h1111; host_wdata = 16'h2222;
    @(negedge clk);
    we = 0; host_we = 0; #1;
    cmp(rdata, 16'h1111, "collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
