// alu: 16-bit arithmetic/logic unit of the processor.
//
// Purely combinational. Computes one of thirteen operations on A and B:
// add, subtract, and, or, nor, xor, signed and unsigned set-less-than
// (result 1 or 0), logical left and right shift, arithmetic right shift,
// and left and right rotate. Shifts and rotates use only B[3:0] as the
// amount, as the instruction set specifies. The same unit serves the
// immediate forms (ADDI, ANDI, ORI, SLTI, SLTIU), for which the datapath
// places the extended immediate on B. The operation list follows the
// instruction set; the encoding of `op` is this implementation's choice.
//
// Ports: a, b (16 bit), op (alu_op_e) -> y (16 bit). No clock.
module alu
  import risc16_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  alu_op_e         op,
  output logic [XLEN-1:0] y
);

  logic [3:0] shamt;
  logic [4:0] shinv;   // XLEN - shamt, the complementary rotate distance

  assign shamt = b[3:0];
  assign shinv = 5'(XLEN) - {1'b0, shamt};

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_NOR:  y = ~(a | b);
      ALU_XOR:  y = a ^ b;
      ALU_SLT:  y = {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      ALU_SLTU: y = {{(XLEN-1){1'b0}}, a < b};
      ALU_SLL:  y = a << shamt;
      ALU_SRL:  y = a >> shamt;
      ALU_SRA:  y = XLEN'($signed(a) >>> shamt);
      ALU_ROL:  y = (a << shamt) | (a >> shinv);
      ALU_ROR:  y = (a >> shamt) | (a << shinv);
      default:  y = '0;
    endcase
  end

endmodule
