// risc16_asm_pkg: instruction encoders for the testbenches.
//
// Small functions that build 16-bit machine words in the processor's three
// formats (R: op rs rt rd funct; I: op rs rt imm6; J: op imm12), plus an
// independent reference model of one instruction (iss_step) used to check
// the RTL. The reference model is written from the instruction table, not
// from the RTL.
package risc16_asm_pkg;
  import risc16_pkg::*;

  // Expected control word for one instruction, written from the
  // instruction table independently of the control unit.
  function automatic ctrl_t ref_ctrl(input logic [15:0] ins);
    ctrl_t       c;
    logic [3:0]  op = ins[15:12];
    logic [2:0]  f  = ins[2:0];
    alu_op_e     r0ops [8] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_NOR, ALU_XOR, ALU_SLT, ALU_SLTU};
    alu_op_e     r1ops [5] = '{ALU_SLL, ALU_SRL, ALU_SRA, ALU_ROL, ALU_ROR};
    alu_op_e     iops  [5] = '{ALU_ADD, ALU_AND, ALU_OR, ALU_SLT, ALU_SLTU};
    br_cond_e    bc    [6] = '{BR_EQ, BR_NE, BR_LTZ, BR_LEZ, BR_GTZ, BR_GEZ};
    c = '{reg_write: 0, dst_sel: DST_RD, alu_src_imm: 0, alu_op: ALU_ADD, wb_sel: WB_ALU,
          mem_write: 0, pc_sel: PC_SEQ, br_cond: BR_EQ};
    if (op == 0) begin
      c.reg_write = 1; c.alu_op = r0ops[f];
    end else if (op == 1) begin
      if (f <= 4) begin c.reg_write = 1; c.alu_op = r1ops[f]; end
      else if (f == 5) begin c.reg_write = 1; c.dst_sel = DST_RT; c.wb_sel = WB_MEM; end
      else if (f == 6) c.mem_write = 1;
      else c.pc_sel = PC_JR;
    end else if (op >= 2 && op <= 6) begin
      c.reg_write = 1; c.dst_sel = DST_RT; c.alu_src_imm = 1; c.alu_op = iops[op - 2];
    end else if (op >= 7 && op <= 12) begin
      c.pc_sel = PC_BRANCH; c.br_cond = bc[op - 7];
    end else if (op == 13) begin
      c.pc_sel = PC_JUMP;
    end else if (op == 14) begin
      c.pc_sel = PC_JUMP; c.reg_write = 1; c.dst_sel = DST_R7; c.wb_sel = WB_PC1;
    end else begin
      c.reg_write = 1; c.dst_sel = DST_R1; c.wb_sel = WB_LUI;
    end
    return c;
  endfunction

  function automatic logic [15:0] enc_r(input logic [3:0] op, input int rs, input int rt,
                                        input int rd, input logic [2:0] f);
    return {op, 3'(rs), 3'(rt), 3'(rd), f};
  endfunction

  function automatic logic [15:0] enc_i(input logic [3:0] op, input int rs, input int rt,
                                        input int imm);
    return {op, 3'(rs), 3'(rt), 6'(imm)};
  endfunction

  function automatic logic [15:0] enc_j(input logic [3:0] op, input int imm);
    return {op, 12'(imm)};
  endfunction

  // Mnemonic helpers
  function automatic logic [15:0] ADD (int rd, int rs, int rt); return enc_r(4'h0, rs, rt, rd, 3'd0); endfunction
  function automatic logic [15:0] SLT (int rd, int rs, int rt); return enc_r(4'h0, rs, rt, rd, 3'd6); endfunction
  function automatic logic [15:0] LW  (int rt, int rs);         return enc_r(4'h1, rs, rt, 0, 3'd5); endfunction
  function automatic logic [15:0] SW  (int rt, int rs);         return enc_r(4'h1, rs, rt, 0, 3'd6); endfunction
  function automatic logic [15:0] JR  (int rs);                 return enc_r(4'h1, rs, 0, 0, 3'd7); endfunction
  function automatic logic [15:0] ADDI(int rt, int rs, int im); return enc_i(4'h2, rs, rt, im); endfunction
  function automatic logic [15:0] BEQ (int rs, int rt, int im); return enc_i(4'h7, rs, rt, im); endfunction
  function automatic logic [15:0] BGTZ(int rs, int im);         return enc_i(4'hB, rs, 0, im); endfunction
  function automatic logic [15:0] JAL (int target);             return enc_j(4'hE, target); endfunction

  // Architectural effect of one instruction
  typedef struct {
    logic        wb_en;
    logic [2:0]  wb_reg;
    logic [15:0] wb_data;
    logic        mem_we;
    logic [11:0] mem_addr;
    logic [15:0] mem_wdata;
    logic [11:0] pc_next;
    logic        taken;
  } effect_t;

  // Reference model: regs[0] must be 0; rdata is Mem(Reg(Rs)[11:0]).
  function automatic effect_t iss_step(input logic [15:0] ins, input logic [11:0] pc,
                                       input logic [15:0] regs [8], input logic [15:0] rdata);
    effect_t e;
    logic [3:0]  op  = ins[15:12];
    logic [2:0]  f   = ins[2:0];
    logic [15:0] a   = regs[ins[11:9]];
    logic [15:0] b   = regs[ins[8:6]];
    logic [15:0] imm = {{10{ins[5]}}, ins[5:0]};
    int          sh  = int'(b[3:0]);
    logic [31:0] dbl;
    e = '{wb_en: 0, wb_reg: ins[5:3], wb_data: 0, mem_we: 0, mem_addr: a[11:0],
          mem_wdata: b, pc_next: pc + 12'd1, taken: 0};
    case (op)
      4'h0: begin
        e.wb_en = 1;
        case (f)
          0: e.wb_data = a + b;
          1: e.wb_data = a - b;
          2: e.wb_data = a & b;
          3: e.wb_data = a | b;
          4: e.wb_data = ~(a | b);
          5: e.wb_data = a ^ b;
          6: e.wb_data = 16'($signed(a) < $signed(b));
          default: e.wb_data = 16'(a < b);
        endcase
      end
      4'h1: begin
        dbl = {a, a};
        case (f)
          0: begin e.wb_en = 1; e.wb_data = a << sh; end
          1: begin e.wb_en = 1; e.wb_data = a >> sh; end
          2: begin e.wb_en = 1; e.wb_data = 16'($signed(a) >>> sh); end
          3: begin e.wb_en = 1; dbl = dbl << sh; e.wb_data = dbl[31:16]; end
          4: begin e.wb_en = 1; dbl = dbl >> sh; e.wb_data = dbl[15:0]; end
          5: begin e.wb_en = 1; e.wb_reg = ins[8:6]; e.wb_data = rdata; end
          6: e.mem_we = 1;
          default: e.pc_next = a[11:0];
        endcase
      end
      4'h2, 4'h3, 4'h4, 4'h5, 4'h6: begin
        e.wb_en = 1; e.wb_reg = ins[8:6];
        case (op)
          4'h2: e.wb_data = a + imm;
          4'h3: e.wb_data = a & imm;
          4'h4: e.wb_data = a | imm;
          4'h5: e.wb_data = 16'($signed(a) < $signed(imm));
          default: e.wb_data = 16'(a < imm);
        endcase
      end
      4'h7, 4'h8, 4'h9, 4'hA, 4'hB, 4'hC: begin
        case (op)
          4'h7: e.taken = (a == b);
          4'h8: e.taken = (a != b);
          4'h9: e.taken = $signed(a) < 0;
          4'hA: e.taken = $signed(a) <= 0;
          4'hB: e.taken = $signed(a) > 0;
          default: e.taken = $signed(a) >= 0;
        endcase
        if (e.taken) e.pc_next = pc + imm[11:0];
      end
      4'hD: e.pc_next = ins[11:0];
      4'hE: begin
        e.wb_en = 1; e.wb_reg = 3'd7; e.wb_data = {4'h0, pc + 12'd1}; e.pc_next = ins[11:0];
      end
      default: begin
        e.wb_en = 1; e.wb_reg = 3'd1; e.wb_data = {ins[11:0], 4'h0};
      end
    endcase
    return e;
  endfunction

endpackage
