// tb_datapath: self-checking test of the datapath alone.
// The control word is supplied by the reference decoder in the testbench
// (not by the control unit). Memories are filled with random words, so the
// program is a random mix of every instruction; after reset the datapath
// runs in lockstep with the reference instruction model, and every cycle
// the PC, register write, memory write and branch outcome are compared.
module tb_datapath;
  import risc16_pkg::*;
  import risc16_asm_pkg::*;

  localparam int RUNS = 6, STEPS = 1500;

  logic        clk = 0, rst;
  ctrl_t       ctrl;
  logic [3:0]  op;
  logic [2:0]  funct;
  logic        imem_load_we, dmem_host_we;
  logic [11:0] imem_load_addr, dmem_host_addr;
  logic [15:0] imem_load_data, dmem_host_wdata, dmem_host_rdata;
  logic [11:0] pc, mem_addr;
  logic [15:0] instr, wb_data, mem_wdata;
  logic        wb_en, mem_we, br_taken;
  logic [2:0]  wb_reg;

  logic [15:0] regs [8];
  logic [15:0] dm   [4096];
  logic [11:0] rpc;
  effect_t     e;
  int          checks = 0, failures = 0;

  datapath dut (.*);

  always #5 clk = ~clk;
  always_comb ctrl = ref_ctrl(instr);

  task automatic cmp(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s pc=%h ins=%h got=%h exp=%h", what, rpc, instr, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; imem_load_we = 0; dmem_host_we = 0;
    imem_load_addr = 0; imem_load_data = 0; dmem_host_addr = 0; dmem_host_wdata = 0;
    for (int run = 0; run < RUNS; run++) begin
      rst = 1;
      @(negedge clk);
      for (int i = 0; i < 4096; i++) begin
        imem_load_we = 1; imem_load_addr = 12'(i); imem_load_data = 16'($urandom);
        dmem_host_we = 1; dmem_host_addr = 12'(i); dmem_host_wdata = 16'($urandom);
        dm[i] = dmem_host_wdata;
        @(negedge clk);
      end
      imem_load_we = 0; dmem_host_we = 0;
      @(negedge clk);
      rst = 0;
      for (int r = 0; r < 8; r++) regs[r] = 0;
      rpc = 0;
      for (int n = 0; n < STEPS; n++) begin
        #1;
        e = iss_step(instr, rpc, regs, dm[regs[instr[11:9]][11:0]]);
        cmp(32'(pc), 32'(rpc), "pc");
        cmp(32'(wb_en), 32'(e.wb_en), "wb_en");
        if (e.wb_en) begin
          cmp(32'(wb_reg), 32'(e.wb_reg), "wb_reg");
          cmp(32'(wb_data), 32'(e.wb_data), "wb_data");
        end
        cmp(32'(mem_we), 32'(e.mem_we), "mem_we");
        if (e.mem_we) begin
          cmp(32'(mem_addr), 32'(e.mem_addr), "mem_addr");
          cmp(32'(mem_wdata), 32'(e.mem_wdata), "mem_wdata");
        end
        @(negedge clk);
        if (e.wb_en && e.wb_reg != 0) regs[e.wb_reg] = e.wb_data;
        if (e.mem_we) dm[e.mem_addr] = e.mem_wdata;
        rpc = e.pc_next;
      end
      // read back part of data memory through the host port
      rst = 1;
      for (int i = 0; i < 64; i++) begin
        dmem_host_addr = 12'($urandom); #1;
        cmp(32'(dmem_host_rdata), 32'(dm[dmem_host_addr]), "host readback");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
