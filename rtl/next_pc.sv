// next_pc: next-PC block of the processor.
//
// Combinational. From the current 12-bit PC it forms PC+1 (sequential
// flow and the JAL return address), the PC-relative branch target
// PC + sign-extend(imm6), the direct jump target imm12 (J, JAL) and the
// register target Reg(Rs)[11:0] (JR). For a branch it also evaluates the
// condition on the register values: equal, not equal, and the four
// sign tests of Reg(Rs) against zero. `pc_sel` chooses the source; a
// branch whose condition fails falls through to PC+1. Addresses wrap
// modulo 4096. The target rules follow the processor's addressing modes;
// the branch target is relative to the address of the branch itself, as
// stated there (so a branch with offset 0 loops on itself).
//
// Ports: pc, imm6, imm12, rs_val, rt_val, pc_sel, br_cond ->
//        pc_next, pc_plus1, taken.
module next_pc
  import risc16_pkg::*;
(
  input  logic [PC_W-1:0] pc,
  input  logic [5:0]      imm6,
  input  logic [11:0]     imm12,
  input  logic [XLEN-1:0] rs_val,
  input  logic [XLEN-1:0] rt_val,
  input  pc_sel_e         pc_sel,
  input  br_cond_e        br_cond,
  output logic [PC_W-1:0] pc_next,
  output logic [PC_W-1:0] pc_plus1,
  output logic            taken
);

  logic [PC_W-1:0] br_target;
  logic            cond;
  logic            neg, zero;

  assign pc_plus1  = pc + 1'b1;
  assign br_target = pc + {{(PC_W-6){imm6[5]}}, imm6};
  assign neg       = rs_val[XLEN-1];
  assign zero      = (rs_val == '0);

  always_comb begin
    unique case (br_cond)
      BR_EQ:   cond = (rs_val == rt_val);
      BR_NE:   cond = (rs_val != rt_val);
      BR_LTZ:  cond = neg;
      BR_LEZ:  cond = neg | zero;
      BR_GTZ:  cond = ~neg & ~zero;
      BR_GEZ:  cond = ~neg;
      default: cond = 1'b0;
    endcase
  end

  always_comb begin
    taken = 1'b0;
    unique case (pc_sel)
      PC_SEQ:    pc_next = pc_plus1;
      PC_BRANCH: begin
        taken   = cond;
        pc_next = cond ? br_target : pc_plus1;
      end
      PC_JUMP:   pc_next = imm12;
      PC_JR:     pc_next = rs_val[PC_W-1:0];
      default:   pc_next = pc_plus1;
    endcase
  end

endmodule
