// reg_file: register file of 2^ADDR_W registers, DATA_W bits each.
//
// Two read ports and one write port. DataA and DataB are combinational:
// they show register SA and register SB in the same cycle the addresses are
// applied, which is what lets a single-cycle processor read two operands,
// compute and write back within one clock period. On a rising clock edge
// with LD high, D_in is stored in register DR; a decoder enabled by LD
// selects the one register that loads, and every other register holds.
//
// Structure (decoder, loadable registers, one read multiplexer per port) and
// the port names follow the lecture. The synchronous reset that clears every
// register is this design's own addition, so that simulations start from a
// known state.
module reg_file #(
  parameter int unsigned DATA_W = sc_pkg::DATA_W,
  parameter int unsigned ADDR_W = sc_pkg::REG_AW
) (
  input  logic              clk,
  input  logic              rst,     // synchronous, clears all registers
  input  logic              ld,      // load register DR with D_in
  input  logic [ADDR_W-1:0] sa,      // source address A
  input  logic [ADDR_W-1:0] sb,      // source address B
  input  logic [ADDR_W-1:0] dr,      // destination address
  input  logic [DATA_W-1:0] d_in,    // write data
  output logic [DATA_W-1:0] data_a,  // register SA
  output logic [DATA_W-1:0] data_b   // register SB
);

  localparam int unsigned NREGS = 2 ** ADDR_W;

  logic [DATA_W-1:0] regs [NREGS];
  logic [NREGS-1:0]  load_en;  // decoder outputs Y0..Y(NREGS-1), enabled by LD

  always_comb begin
    load_en = '0;
    if (ld) load_en[dr] = 1'b1;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NREGS; i++) begin
      if (rst)             regs[i] <= '0;
      else if (load_en[i]) regs[i] <= d_in;
    end
  end

  assign data_a = regs[sa];
  assign data_b = regs[sb];

endmodule
