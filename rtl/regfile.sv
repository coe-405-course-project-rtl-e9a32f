// regfile: register file of the processor, R0..R7, 16 bits each.
//
// R0 always reads as zero and ignores writes; R1..R7 are seven real
// 16-bit registers, as the instruction set defines. Two read ports are
// combinational (asynchronous) so a single-cycle datapath reads Rs and Rt
// in the same cycle it executes. The write port is written at the rising
// clock edge when `we` is high. A synchronous, active-high reset clears
// R1..R7 to zero; the reset and the read/write timing are this
// implementation's choices.
//
// Ports: clk, rst, ra1/ra2 -> rd1/rd2, we/wa/wd write port.
module regfile
  import risc16_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [REG_AW-1:0] ra1,
  input  logic [REG_AW-1:0] ra2,
  output logic [XLEN-1:0]   rd1,
  output logic [XLEN-1:0]   rd2,
  input  logic              we,
  input  logic [REG_AW-1:0] wa,
  input  logic [XLEN-1:0]   wd
);

  logic [XLEN-1:0] regs [1:7];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i <= 7; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];

endmodule
