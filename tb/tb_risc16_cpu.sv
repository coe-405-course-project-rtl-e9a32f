// tb_risc16_cpu: end-to-end test of the processor at its default size.
//
// Part 1 runs the selection-sort workload: a main loop that, for
// i = 7 down to 1, calls a Max procedure (JAL/JR) to find the largest of
// A[0..i] and swaps it into A[i], sorting an 8-word signed array held at
// data address 0. Several arrays are sorted (one fixed, the rest random);
// the result is read back through the host port and compared with a sort
// done here, and the number of clock cycles to reach the final self-loop
// must equal the number of instructions executed (one per cycle).
//
// Part 2 fills both 4096-word memories with random words (every 16-bit word
// is a valid instruction) and runs the processor in lockstep with the
// reference instruction model, comparing PC, register writes and memory
// writes each cycle.
//
// Throughout, the testbench counts how often each instruction executes,
// each branch is taken and not taken, R0 is targeted by a write, and a
// JAL is followed by a JR back to its return address; any of these that
// never happens counts as a failure.
module tb_risc16_cpu;
  import risc16_pkg::*;
  import risc16_asm_pkg::*;

  localparam int SORT_RUNS = 4, RAND_RUNS = 8, STEPS = 2000;

  logic        clk = 0, rst;
  logic        imem_load_we, dmem_host_we;
  logic [11:0] imem_load_addr, dmem_host_addr;
  logic [15:0] imem_load_data, dmem_host_wdata, dmem_host_rdata;
  logic [11:0] pc, mem_addr;
  logic [15:0] instr, wb_data, mem_wdata;
  logic        wb_en, mem_we, br_taken;
  logic [2:0]  wb_reg;

  logic [15:0] regs [8];
  logic [15:0] dm   [4096];
  logic [15:0] prog [4096];
  logic [11:0] rpc;
  effect_t     e;
  int          checks = 0, failures = 0;

  // coverage
  int n_instr [32];        // index: op*2 for I/J, or 16+funct (op0) / 24+funct (op1)
  int n_taken [6], n_not [6];
  int n_r0_write = 0, n_ret = 0;
  logic [11:0] last_link;
  logic        link_valid;

  risc16_cpu dut (.*);

  always #5 clk = ~clk;

  task automatic cmp(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s pc=%h ins=%h got=%h exp=%h", what, rpc, instr, got, exp);
    end
  endtask

  function automatic int instr_index(logic [15:0] ins);
    if (ins[15:12] == 4'h0) return 16 + int'(ins[2:0]);
    if (ins[15:12] == 4'h1) return 24 + int'(ins[2:0]);
    return int'(ins[15:12]);
  endfunction

  // Load prog[] and dm[] into the processor while it is held in reset.
  task automatic load_all(int nwords);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < nwords; i++) begin
      imem_load_we = 1; imem_load_addr = 12'(i); imem_load_data = prog[i];
      dmem_host_we = 1; dmem_host_addr = 12'(i); dmem_host_wdata = dm[i];
      @(negedge clk);
    end
    imem_load_we = 0; dmem_host_we = 0;
    @(negedge clk);
  endtask

  // Run in lockstep for at most `steps` cycles; stop early when the
  // reference reaches a self-loop (pc_next == pc). Returns cycles run.
  task automatic lockstep(int steps, bit stop_at_halt, output int cycles);
    rst = 0;
    for (int r = 0; r < 8; r++) regs[r] = 0;
    rpc = 0; link_valid = 0;
    cycles = 0;
    for (int n = 0; n < steps; n++) begin
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
      // coverage
      n_instr[instr_index(instr)]++;
      if (instr[15:12] >= 4'h7 && instr[15:12] <= 4'hC) begin
        if (br_taken) n_taken[instr[15:12] - 4'h7]++;
        else          n_not[instr[15:12] - 4'h7]++;
      end
      if (e.wb_en && e.wb_reg == 0) n_r0_write++;
      if (instr[15:12] == 4'hE) begin last_link = rpc + 12'd1; link_valid = 1; end
      if (instr[15:12] == 4'h1 && instr[2:0] == 3'd7 && link_valid && e.pc_next == last_link
          && instr[11:9] == 3'd7) n_ret++;
      cycles++;
      if (stop_at_halt && e.pc_next == rpc) break;
      @(negedge clk);
      if (e.wb_en && e.wb_reg != 0) regs[e.wb_reg] = e.wb_data;
      if (e.mem_we) dm[e.mem_addr] = e.mem_wdata;
      rpc = e.pc_next;
    end
  endtask

  // Selection sort with a Max procedure; array A[0..7] at data address 0.
  task automatic build_sort_program();
    for (int i = 0; i < 4096; i++) prog[i] = BEQ(0, 0, 0);
    // main
    prog[0]  = ADDI(1, 0, 7);     // R1 = i = 7
    prog[1]  = ADDI(2, 0, 0);     // loop: R2 = first address
    prog[2]  = ADD(3, 1, 0);      // R3 = last address = i
    prog[3]  = JAL(11);           // R4 = address of max(A[0..i])
    prog[4]  = LW(5, 4);          // R5 = A[max]
    prog[5]  = LW(6, 1);          // R6 = A[i]
    prog[6]  = SW(6, 4);          // A[max] = R6
    prog[7]  = SW(5, 1);          // A[i]   = R5
    prog[8]  = ADDI(1, 1, -1);    // i--
    prog[9]  = BGTZ(1, -8);       // while i > 0 goto loop
    prog[10] = BEQ(0, 0, 0);      // halt: branch to itself
    // Max(R2 = first, R3 = last) -> R4 = address of largest (signed)
    prog[11] = ADD(4, 2, 0);      // R4 = first
    prog[12] = LW(5, 4);          // R5 = current max value
    prog[13] = BEQ(2, 3, 8);      // mloop: done when scan == last
    prog[14] = ADDI(2, 2, 1);     // scan++
    prog[15] = LW(6, 2);          // R6 = A[scan]
    prog[16] = SLT(6, 5, 6);      // R6 = max < A[scan]
    prog[17] = BEQ(6, 0, -4);     // not larger: keep scanning
    prog[18] = ADD(4, 2, 0);      // new max address
    prog[19] = LW(5, 4);          // new max value
    prog[20] = BEQ(0, 0, -7);     // goto mloop
    prog[21] = JR(7);             // return
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          cyc;
    logic [15:0] arr [8];
    logic [15:0] t;
    rst = 1; imem_load_we = 0; dmem_host_we = 0;
    imem_load_addr = 0; imem_load_data = 0; dmem_host_addr = 0; dmem_host_wdata = 0;
    foreach (n_instr[i]) n_instr[i] = 0;
    foreach (n_taken[i]) begin n_taken[i] = 0; n_not[i] = 0; end

    // ---------------- Part 1: selection sort ----------------
    build_sort_program();
    for (int run = 0; run < SORT_RUNS; run++) begin
      for (int i = 0; i < 4096; i++) dm[i] = 16'($urandom);
      if (run == 0) begin
        arr = '{16'd5, -16'sd3, 16'd100, 16'd7, 16'd0, -16'sd20, 16'd42, 16'd7};
      end else begin
        for (int i = 0; i < 8; i++) arr[i] = 16'($urandom);
      end
      for (int i = 0; i < 8; i++) dm[i] = arr[i];
      load_all(4096);
      lockstep(5000, 1, cyc);
      // the processor must be at the halt loop after exactly `cyc` cycles
      cmp(32'(pc), 32'd10, "sort halt pc");
      // expected: ascending signed order, computed here
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 7 - i; j++)
          if ($signed(arr[j]) > $signed(arr[j+1])) begin t = arr[j]; arr[j] = arr[j+1]; arr[j+1] = t; end
      rst = 1;
      for (int i = 0; i < 8; i++) begin
        dmem_host_addr = 12'(i); #1;
        cmp(32'(dmem_host_rdata), 32'(arr[i]), "sorted word");
      end
      $display("sort run %0d: %0d cycles to halt, %0d-%0d-%0d-%0d-%0d-%0d-%0d-%0d", run, cyc,
               $signed(arr[0]), $signed(arr[1]), $signed(arr[2]), $signed(arr[3]),
               $signed(arr[4]), $signed(arr[5]), $signed(arr[6]), $signed(arr[7]));
    end

    // ---------------- Part 2: random programs ----------------
    for (int run = 0; run < RAND_RUNS; run++) begin
      for (int i = 0; i < 4096; i++) begin
        prog[i] = 16'($urandom);
        dm[i]   = 16'($urandom);
      end
      // a call/return pair near the start so JAL/JR is always exercised
      prog[0] = JAL(12'h100);
      prog[12'h100] = JR(7);
      load_all(4096);
      lockstep(STEPS, 0, cyc);
      rst = 1;
      for (int i = 0; i < 32; i++) begin
        dmem_host_addr = 12'($urandom); #1;
        cmp(32'(dmem_host_rdata), 32'(dm[dmem_host_addr]), "host readback");
      end
    end

    // ---------------- coverage ----------------
    for (int i = 2; i < 32; i++) begin
      if (i >= 16 || (i >= 2 && i <= 15)) begin
        checks++;
        if (n_instr[i] == 0) begin failures++; $display("FAIL instruction index %0d never executed", i); end
      end
    end
    for (int b = 0; b < 6; b++) begin
      checks += 2;
      if (n_taken[b] == 0) begin failures++; $display("FAIL branch %0d never taken", b); end
      if (n_not[b] == 0)   begin failures++; $display("FAIL branch %0d never fell through", b); end
    end
    checks++; if (n_r0_write == 0) begin failures++; $display("FAIL no write aimed at R0"); end
    checks++; if (n_ret == 0)      begin failures++; $display("FAIL no JAL/JR return"); end
    $display("coverage: r0_writes=%0d returns=%0d lw=%0d sw=%0d lui=%0d", n_r0_write, n_ret,
             n_instr[29], n_instr[30], n_instr[15]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
