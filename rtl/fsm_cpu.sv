// fsm_cpu: the hardwired multiplier, the datapath driven by mult_fsm_cu.
//
// Place the multiplicand A in memory word 0 and the multiplier B in word 1
// through the host port, pulse START for one cycle while BUSY is low, and
// wait for BUSY to fall: word 2 then holds A * B modulo 2^DATA_W. The
// control unit steers the datapath one control word per cycle and reads the
// ALU condition codes back to decide when to skip the add and when to leave
// the loop. Timing: see mult_fsm_cu.
//
// Pairing this control unit with the shared datapath is the lecture's
// arrangement; the host port is this design's addition.
module fsm_cpu
  import sc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output ctrl_word_t        cw,        // control word being executed
  input  logic              host_we,
  input  logic [DATA_W-1:0] host_addr,
  input  logic [DATA_W-1:0] host_wdata,
  output logic [DATA_W-1:0] host_rdata
);

  flags_t            flags;
  logic [DATA_W-1:0] alu_y, wb_data;

  mult_fsm_cu u_cu (
    .clk  (clk),
    .rst  (rst),
    .start(start),
    .flags(flags),
    .cw   (cw),
    .busy (busy)
  );

  datapath u_dp (
    .clk       (clk),
    .rst       (rst),
    .cw        (cw),
    .flags     (flags),
    .alu_y     (alu_y),
    .wb_data   (wb_data),
    .host_we   (host_we),
    .host_addr (host_addr),
    .host_wdata(host_wdata),
    .host_rdata(host_rdata)
  );

endmodule
