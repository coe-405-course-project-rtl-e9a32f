// control_unit: main decoder of the processor.
//
// Combinational. Turns the 4-bit opcode and, for opcodes 0 and 1, the
// 3-bit function field into one control word (risc16_pkg::ctrl_t) per
// instruction:
//   opcode 0      ADD SUB AND OR NOR XOR SLT SLTU   Rd <- Rs op Rt
//   opcode 1      SLL SRL SRA ROL ROR               Rd <- Rs op Rt[3:0]
//                 LW  Rt <- Mem(Rs);  SW  Mem(Rs) <- Rt;  JR  PC <- Rs
//   ADDI ANDI ORI SLTI SLTIU                        Rt <- Rs op ext(imm6)
//   BEQ BNE BLTZ BLEZ BGTZ BGEZ                     PC-relative branch
//   J, JAL (R7 <- PC+1), LUI (R1 <- imm12 << 4)
// Every immediate is sign-extended. LW and all I-type results are
// written to Rt; ROL/ROR write Rd like the other shifts. The mapping of
// instructions to operations follows the published instruction table; the
// layout of the control word is this implementation's own.
//
// Ports: op, funct -> ctrl.
module control_unit
  import risc16_pkg::*;
(
  input  logic [3:0] op,
  input  logic [2:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{reg_write:   1'b0,
             dst_sel:     DST_RD,
             alu_src_imm: 1'b0,
             alu_op:      ALU_ADD,
             wb_sel:      WB_ALU,
             mem_write:   1'b0,
             pc_sel:      PC_SEQ,
             br_cond:     BR_EQ};
    unique case (opcode_e'(op))
      OP_R0: begin
        ctrl.reg_write = 1'b1;
        unique case (funct)
          F0_ADD:  ctrl.alu_op = ALU_ADD;
          F0_SUB:  ctrl.alu_op = ALU_SUB;
          F0_AND:  ctrl.alu_op = ALU_AND;
          F0_OR:   ctrl.alu_op = ALU_OR;
          F0_NOR:  ctrl.alu_op = ALU_NOR;
          F0_XOR:  ctrl.alu_op = ALU_XOR;
          F0_SLT:  ctrl.alu_op = ALU_SLT;
          F0_SLTU: ctrl.alu_op = ALU_SLTU;
          default: ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_R1: begin
        unique case (funct)
          F1_SLL: begin ctrl.reg_write = 1'b1; ctrl.alu_op = ALU_SLL; end
          F1_SRL: begin ctrl.reg_write = 1'b1; ctrl.alu_op = ALU_SRL; end
          F1_SRA: begin ctrl.reg_write = 1'b1; ctrl.alu_op = ALU_SRA; end
          F1_ROL: begin ctrl.reg_write = 1'b1; ctrl.alu_op = ALU_ROL; end
          F1_ROR: begin ctrl.reg_write = 1'b1; ctrl.alu_op = ALU_ROR; end
          F1_LW: begin
            ctrl.reg_write = 1'b1;
            ctrl.dst_sel   = DST_RT;
            ctrl.wb_sel    = WB_MEM;
          end
          F1_SW:   ctrl.mem_write = 1'b1;
          F1_JR:   ctrl.pc_sel    = PC_JR;
          default: ;
        endcase
      end
      OP_ADDI, OP_ANDI, OP_ORI, OP_SLTI, OP_SLTIU: begin
        ctrl.reg_write   = 1'b1;
        ctrl.dst_sel     = DST_RT;
        ctrl.alu_src_imm = 1'b1;
        unique case (opcode_e'(op))
          OP_ADDI:  ctrl.alu_op = ALU_ADD;
          OP_ANDI:  ctrl.alu_op = ALU_AND;
          OP_ORI:   ctrl.alu_op = ALU_OR;
          OP_SLTI:  ctrl.alu_op = ALU_SLT;
          default:  ctrl.alu_op = ALU_SLTU;
        endcase
      end
      OP_BEQ:  begin ctrl.pc_sel = PC_BRANCH; ctrl.br_cond = BR_EQ;  end
      OP_BNE:  begin ctrl.pc_sel = PC_BRANCH; ctrl.br_cond = BR_NE;  end
      OP_BLTZ: begin ctrl.pc_sel = PC_BRANCH; ctrl.br_cond = BR_LTZ; end
      OP_BLEZ: begin ctrl.pc_sel = PC_BRANCH; ctrl.br_cond = BR_LEZ; end
      OP_BGTZ: begin ctrl.pc_sel = PC_BRANCH; ctrl.br_cond = BR_GTZ; end
      OP_BGEZ: begin ctrl.pc_sel = PC_BRANCH; ctrl.br_cond = BR_GEZ; end
      OP_J:    ctrl.pc_sel = PC_JUMP;
      OP_JAL: begin
        ctrl.pc_sel    = PC_JUMP;
        ctrl.reg_write = 1'b1;
        ctrl.dst_sel   = DST_R7;
        ctrl.wb_sel    = WB_PC1;
      end
      OP_LUI: begin
        ctrl.reg_write = 1'b1;
        ctrl.dst_sel   = DST_R1;
        ctrl.wb_sel    = WB_LUI;
      end
      default: ;
    endcase
  end

endmodule
