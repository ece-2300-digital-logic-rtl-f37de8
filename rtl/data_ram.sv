// data_ram: data memory (RAM) of the single-cycle processor.
//
// 2^ADDR_W words of DATA_W bits. The processor port reads combinationally:
// RDATA shows M[ADDR] in the same cycle, so a load completes in one clock
// period. When WE (the control word's MW) is high, WDATA is written to
// M[ADDR] at the rising clock edge.
//
// A second, host port (HOST_*) with the same timing lets a test bench or a
// surrounding system place operands in memory and read results; the lecture
// does not say how data reaches memory, so this port is this design's own
// addition. If both ports write the same word in one cycle, the processor's
// write wins. Memory contents are not reset.
module data_ram #(
  parameter int unsigned DATA_W = sc_pkg::DATA_W,
  parameter int unsigned ADDR_W = sc_pkg::DATA_W
) (
  input  logic              clk,
  // processor port: M_address from the ALU, Data_in from DataB
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  // host port
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_addr,
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
