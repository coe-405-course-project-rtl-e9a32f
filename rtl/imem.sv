// imem: instruction memory, 2^ADDR_W words of 16 bits (4096 by default).
//
// Word addressed: each address holds one whole instruction, so the PC
// steps by one. The fetch port is combinational (asynchronous read), which
// lets the single-cycle processor fetch and execute in one clock. A
// synchronous load port writes one word per rising edge; it is how a
// program is placed in memory before the processor is released from
// reset. The size follows the processor description; the load port and
// the asynchronous read are this implementation's choices. Contents are
// not cleared by reset.
//
// Ports: addr -> instr (fetch); clk, load_we, load_addr, load_data (load).
module imem #(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] instr,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [DATA_W-1:0] load_data
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign instr = mem[addr];

endmodule
