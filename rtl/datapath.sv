// datapath: single-cycle datapath of the 16-bit processor.
//
// Holds the 12-bit PC register and wires the register file, ALU, next-PC
// block, instruction memory and data memory together. Each clock cycle one
// instruction is fetched from the instruction memory at PC, its Rs and Rt
// are read, the ALU (or the data memory, PC+1 for JAL, or imm12<<4 for LUI)
// produces the write-back value, and at the rising edge the register file,
// the data memory (SW) and the PC are updated together. The B operand of
// the ALU is Reg(Rt) or the sign-extended 6-bit immediate. Memory
// addresses for LW/SW are Reg(Rs)[11:0] (base addressing with no offset).
// The destination is Rd, Rt, R1 (LUI) or R7 (JAL), as the control word
// selects. The list of components follows the processor description; the
// single-cycle organisation is this implementation's choice.
//
// Reset (synchronous, active high) sets PC to 0 and clears R1..R7.
// The instruction memory load port and the data memory host port are
// brought out for the system that loads programs and reads results.
module datapath
  import risc16_pkg::*;
#(
  parameter int unsigned IMEM_AW = 12,
  parameter int unsigned DMEM_AW = 12
) (
  input  logic               clk,
  input  logic               rst,
  input  ctrl_t              ctrl,
  output logic [3:0]         op,
  output logic [2:0]         funct,
  // program load
  input  logic               imem_load_we,
  input  logic [IMEM_AW-1:0] imem_load_addr,
  input  logic [XLEN-1:0]    imem_load_data,
  // data memory host port
  input  logic               dmem_host_we,
  input  logic [DMEM_AW-1:0] dmem_host_addr,
  input  logic [XLEN-1:0]    dmem_host_wdata,
  output logic [XLEN-1:0]    dmem_host_rdata,
  // observation of the instruction being executed
  output logic [PC_W-1:0]    pc,
  output logic [XLEN-1:0]    instr,
  output logic               wb_en,
  output logic [REG_AW-1:0]  wb_reg,
  output logic [XLEN-1:0]    wb_data,
  output logic               mem_we,
  output logic [PC_W-1:0]    mem_addr,
  output logic [XLEN-1:0]    mem_wdata,
  output logic               br_taken
);

  logic [REG_AW-1:0] rs, rt, rd;
  logic [5:0]        imm6;
  logic [11:0]       imm12;
  logic [XLEN-1:0]   rs_val, rt_val, imm_ext, alu_b, alu_y, mem_rdata;
  logic [PC_W-1:0]   pc_nxt, pc_plus1;

  // ---- fetch ----
  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= pc_nxt;
  end

  imem #(.ADDR_W(IMEM_AW), .DATA_W(XLEN)) u_imem (
    .clk       (clk),
    .addr      (IMEM_AW'(pc)),
    .instr     (instr),
    .load_we   (imem_load_we),
    .load_addr (imem_load_addr),
    .load_data (imem_load_data)
  );

  // ---- decode fields ----
  assign op    = instr[15:12];
  assign rs    = instr[11:9];
  assign rt    = instr[8:6];
  assign rd    = instr[5:3];
  assign funct = instr[2:0];
  assign imm6  = instr[5:0];
  assign imm12 = instr[11:0];
  assign imm_ext = {{(XLEN-6){imm6[5]}}, imm6};

  // ---- register file ----
  always_comb begin
    unique case (ctrl.dst_sel)
      DST_RD:  wb_reg = rd;
      DST_RT:  wb_reg = rt;
      DST_R1:  wb_reg = 3'd1;
      default: wb_reg = 3'd7;
    endcase
  end

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_ALU:  wb_data = alu_y;
      WB_MEM:  wb_data = mem_rdata;
      WB_PC1:  wb_data = {{(XLEN-PC_W){1'b0}}, pc_plus1};
      default: wb_data = {imm12, 4'b0000};
    endcase
  end

  // Writes are suppressed during reset so that reset always wins.
  assign wb_en = ctrl.reg_write & ~rst;

  regfile u_rf (
    .clk (clk),
    .rst (rst),
    .ra1 (rs),
    .ra2 (rt),
    .rd1 (rs_val),
    .rd2 (rt_val),
    .we  (wb_en),
    .wa  (wb_reg),
    .wd  (wb_data)
  );

  // ---- execute ----
  assign alu_b = ctrl.alu_src_imm ? imm_ext : rt_val;

  alu u_alu (
    .a  (rs_val),
    .b  (alu_b),
    .op (ctrl.alu_op),
    .y  (alu_y)
  );

  next_pc u_npc (
    .pc       (pc),
    .imm6     (imm6),
    .imm12    (imm12),
    .rs_val   (rs_val),
    .rt_val   (rt_val),
    .pc_sel   (ctrl.pc_sel),
    .br_cond  (ctrl.br_cond),
    .pc_next  (pc_nxt),
    .pc_plus1 (pc_plus1),
    .taken    (br_taken)
  );

  // ---- memory ----
  assign mem_we    = ctrl.mem_write & ~rst;
  assign mem_addr  = rs_val[PC_W-1:0];
  assign mem_wdata = rt_val;

  dmem #(.ADDR_W(DMEM_AW), .DATA_W(XLEN)) u_dmem (
    .clk        (clk),
    .addr       (DMEM_AW'(mem_addr)),
    .we         (mem_we),
    .wdata      (mem_wdata),
    .rdata      (mem_rdata),
    .host_addr  (dmem_host_addr),
    .host_we    (dmem_host_we),
    .host_wdata (dmem_host_wdata),
    .host_rdata (dmem_host_rdata)
  );

endmodule
