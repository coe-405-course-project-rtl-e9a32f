// tb_next_pc: self-checking test of the next-PC block.
// Random PCs, immediates and register values under every PC source and
// branch condition, compared with a reference computed here, plus the
// wrap-around corners of the 12-bit PC.
module tb_next_pc;
  import risc16_pkg::*;

  logic        clk = 0;
  logic [11:0] pc, imm12, pc_next, pc_plus1;
  logic [5:0]  imm6;
  logic [15:0] rs_val, rt_val;
  pc_sel_e     pc_sel;
  br_cond_e    br_cond;
  logic        taken;
  int          checks = 0, failures = 0;

  next_pc dut (.*);

  always #5 clk = ~clk;

  task automatic run_one();
    int          s_rs, off;
    logic        c;
    logic [11:0] e;
    #1;
    s_rs = int'($signed(rs_val));
    off  = int'($signed(imm6));
    case (br_cond)
      BR_EQ:  c = rs_val == rt_val;
      BR_NE:  c = rs_val != rt_val;
      BR_LTZ: c = s_rs < 0;
      BR_LEZ: c = s_rs <= 0;
      BR_GTZ: c = s_rs > 0;
      default: c = s_rs >= 0;
    endcase
    case (pc_sel)
      PC_SEQ:    e = 12'((int'(pc) + 1) % 4096);
      PC_BRANCH: e = c ? 12'((int'(pc) + off + 4096) % 4096) : 12'((int'(pc) + 1) % 4096);
      PC_JUMP:   e = imm12;
      default:   e = rs_val[11:0];
    endcase
    checks++;
    if (pc_next !== e || pc_plus1 !== 12'(int'(pc) + 1) || taken !== (pc_sel == PC_BRANCH && c)) begin
      failures++;
      $display("FAIL sel=%s cond=%s pc=%h imm6=%h rs=%h rt=%h next=%h exp=%h taken=%b",
               pc_sel.name(), br_cond.name(), pc, imm6, rs_val, rt_val, pc_next, e, taken);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corners
    pc = 12'hfff; imm6 = 6'h01; imm12 = 0; rs_val = 0; rt_val = 0;
    pc_sel = PC_SEQ; br_cond = BR_EQ; run_one();                 // wrap to 0
    pc = 12'h000; imm6 = 6'h3f; pc_sel = PC_BRANCH; run_one();   // 0 - 1 wraps to fff
    pc = 12'h123; imm6 = 6'h00; run_one();                       // branch to self
    rs_val = 16'h8000; br_cond = BR_LTZ; run_one();
    rs_val = 16'h0000; br_cond = BR_LEZ; run_one();
    rs_val = 16'h0000; br_cond = BR_GTZ; run_one();
    rs_val = 16'h7fff; br_cond = BR_GEZ; run_one();
    rs_val = 16'hf456; pc_sel = PC_JR; run_one();
    for (int n = 0; n < 5000; n++) begin
      pc = 12'($urandom); imm6 = 6'($urandom); imm12 = 12'($urandom);
      rs_val = ($urandom_range(0, 3) == 0) ? 16'h0 : 16'($urandom);
      rt_val = ($urandom_range(0, 3) == 0) ? rs_val : 16'($urandom);
      pc_sel = pc_sel_e'($urandom_range(0, 3));
      br_cond = br_cond_e'($urandom_range(0, 5));
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
