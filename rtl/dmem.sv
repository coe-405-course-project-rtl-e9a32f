// dmem: data memory, 2^ADDR_W words of 16 bits (4096 by default).
//
// Word addressed; only whole words are read and written. Two ports:
// the processor port (LW/SW) and a host port used to load the data
// segment and to read results while the processor is held in reset.
// Both ports read combinationally and write at the rising clock edge
// when their write enable is high; if both write the same word in the
// same cycle the processor port wins. The size and word addressing follow
// the processor description; the host port and read timing are this
// implementation's choices. Contents are not cleared by reset.
//
// Ports: clk; addr, we, wdata -> rdata (processor);
//        host_addr, host_we, host_wdata -> host_rdata (host).
module dmem #(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  input  logic [ADDR_W-1:0] host_addr,
  input  logic              host_we,
  input  logic [DATA_W-1:0] host_wdata,
  output logic [DATA_W-1:0] host_rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
    if (we)      mem[addr]      <= wdata;
  end

  assign rdata      = mem[addr];
  assign host_rdata = mem[host_addr];

endmodule
