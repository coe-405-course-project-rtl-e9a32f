// risc16_cpu: top of the 16-bit MIPS-like processor.
//
// A single-cycle processor with seven general registers (R0 reads zero),
// a 12-bit word-addressed PC, and separate 4096-word instruction and data
// memories. It is the composition the processor description asks for: a
// control unit that decodes each instruction into a control word, and a
// datapath built from the register file, ALU, next-PC block and the two
// memories. One instruction completes per clock cycle.
//
// Use: hold `rst` high, write the program through the imem_load_* port and
// the data segment through the dmem_host_* port, then drop `rst`. The
// processor starts at address 0. A program ends by branching or jumping to
// itself; results are read back through dmem_host_*. The observation
// outputs (pc, instr, wb_*, mem_*, br_taken) show what the instruction of
// the current cycle does and take effect at the next rising edge.
//
// The keypad and LCD of the calculator application are not part of this
// RTL; nothing in the processor description says how they attach.
module risc16_cpu
  import risc16_pkg::*;
#(
  parameter int unsigned IMEM_AW = 12,
  parameter int unsigned DMEM_AW = 12
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               imem_load_we,
  input  logic [IMEM_AW-1:0] imem_load_addr,
  input  logic [XLEN-1:0]    imem_load_data,
  input  logic               dmem_host_we,
  input  logic [DMEM_AW-1:0] dmem_host_addr,
  input  logic [XLEN-1:0]    dmem_host_wdata,
  output logic [XLEN-1:0]    dmem_host_rdata,
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

  ctrl_t      ctrl;
  logic [3:0] op;
  logic [2:0] funct;

  control_unit u_ctrl (
    .op    (op),
    .funct (funct),
    .ctrl  (ctrl)
  );

  datapath #(.IMEM_AW(IMEM_AW), .DMEM_AW(DMEM_AW)) u_dp (
    .clk             (clk),
    .rst             (rst),
    .ctrl            (ctrl),
    .op              (op),
    .funct           (funct),
    .imem_load_we    (imem_load_we),
    .imem_load_addr  (imem_load_addr),
    .imem_load_data  (imem_load_data),
    .dmem_host_we    (dmem_host_we),
    .dmem_host_addr  (dmem_host_addr),
    .dmem_host_wdata (dmem_host_wdata),
    .dmem_host_rdata (dmem_host_rdata),
    .pc              (pc),
    .instr           (instr),
    .wb_en           (wb_en),
    .wb_reg          (wb_reg),
    .wb_data         (wb_data),
    .mem_we          (mem_we),
    .mem_addr        (mem_addr),
    .mem_wdata       (mem_wdata),
    .br_taken        (br_taken)
  );

endmodule
