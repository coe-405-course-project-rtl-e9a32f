// risc16_pkg: shared types and constants of the 16-bit MIPS-like processor.
//
// Holds the instruction-field widths, the sixteen major opcodes, the
// function codes of the two R-type opcodes (0 and 1), the ALU operation
// codes, and the control word that the control unit hands to the datapath.
// The opcode and function numbers follow the processor's published
// instruction encoding; the ALU codes and the control-word layout are this
// implementation's own choice.
package risc16_pkg;

  localparam int unsigned XLEN   = 16;  // data and instruction width
  localparam int unsigned PC_W   = 12;  // program counter / memory address width
  localparam int unsigned REG_AW = 3;   // register number width (R0..R7)

  // Major opcodes (instruction bits [15:12])
  typedef enum logic [3:0] {
    OP_R0   = 4'b0000,  // ADD SUB AND OR NOR XOR SLT SLTU
    OP_R1   = 4'b0001,  // SLL SRL SRA ROL ROR LW SW JR
    OP_ADDI = 4'b0010,
    OP_ANDI = 4'b0011,
    OP_ORI  = 4'b0100,
    OP_SLTI = 4'b0101,
    OP_SLTIU= 4'b0110,
    OP_BEQ  = 4'b0111,
    OP_BNE  = 4'b1000,
    OP_BLTZ = 4'b1001,
    OP_BLEZ = 4'b1010,
    OP_BGTZ = 4'b1011,
    OP_BGEZ = 4'b1100,
    OP_J    = 4'b1101,
    OP_JAL  = 4'b1110,
    OP_LUI  = 4'b1111
  } opcode_e;

  // Function codes under opcode 0
  localparam logic [2:0] F0_ADD  = 3'b000;
  localparam logic [2:0] F0_SUB  = 3'b001;
  localparam logic [2:0] F0_AND  = 3'b010;
  localparam logic [2:0] F0_OR   = 3'b011;
  localparam logic [2:0] F0_NOR  = 3'b100;
  localparam logic [2:0] F0_XOR  = 3'b101;
  localparam logic [2:0] F0_SLT  = 3'b110;
  localparam logic [2:0] F0_SLTU = 3'b111;

  // Function codes under opcode 1
  localparam logic [2:0] F1_SLL = 3'b000;
  localparam logic [2:0] F1_SRL = 3'b001;
  localparam logic [2:0] F1_SRA = 3'b010;
  localparam logic [2:0] F1_ROL = 3'b011;
  localparam logic [2:0] F1_ROR = 3'b100;
  localparam logic [2:0] F1_LW  = 3'b101;
  localparam logic [2:0] F1_SW  = 3'b110;
  localparam logic [2:0] F1_JR  = 3'b111;

  // ALU operations
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_NOR, ALU_XOR, ALU_SLT, ALU_SLTU,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_ROL, ALU_ROR
  } alu_op_e;

  // Destination register selection
  typedef enum logic [1:0] { DST_RD, DST_RT, DST_R1, DST_R7 } dst_sel_e;

  // Register write-back source
  typedef enum logic [1:0] { WB_ALU, WB_MEM, WB_PC1, WB_LUI } wb_sel_e;

  // Next-PC source
  typedef enum logic [1:0] { PC_SEQ, PC_BRANCH, PC_JUMP, PC_JR } pc_sel_e;

  // Branch condition (used when pc_sel == PC_BRANCH)
  typedef enum logic [2:0] { BR_EQ, BR_NE, BR_LTZ, BR_LEZ, BR_GTZ, BR_GEZ } br_cond_e;

  // Control word: one per instruction, produced combinationally
  typedef struct packed {
    logic     reg_write;  // write the register file this cycle
    dst_sel_e dst_sel;    // which register is written
    logic     alu_src_imm;// ALU B operand: 0 = Reg(Rt), 1 = sign-extended imm6
    alu_op_e  alu_op;
    wb_sel_e  wb_sel;
    logic     mem_write;  // store Reg(Rt) at Mem(Reg(Rs))
    pc_sel_e  pc_sel;
    br_cond_e br_cond;
  } ctrl_t;

endpackage
