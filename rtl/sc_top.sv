// sc_top: the two single-cycle processors of the design, side by side.
//
// Both share one datapath design (register file, sign extender, B-operand
// multiplexer, ALU, data memory, write-back multiplexer) and differ in how
// control words are produced:
//   p_*  prog_cpu: program counter + control ROM + branch select, running
//        the shift-and-add multiplication program from ROM.
//   f_*  fsm_cpu: the hardwired ten-state multiplier control unit, started
//        by f_start.
// Each has its own reset, memory host port and status outputs; they share
// only the clock. Both compute M[2] = M[0] * M[1]: see prog_cpu and fsm_cpu
// for how to load operands and when the result is ready.
module sc_top
  import sc_pkg::*;
(
  input  logic              clk,
  // programmable processor
  input  logic              p_rst,
  output logic [PC_W-1:0]   p_pc,
  output ctrl_word_t        p_cw,
  output logic              p_mp,
  output flags_t            p_flags,
  input  logic              p_host_we,
  input  logic [DATA_W-1:0] p_host_addr,
  input  logic [DATA_W-1:0] p_host_wdata,
  output logic [DATA_W-1:0] p_host_rdata,
  // hardwired multiplier
  input  logic              f_rst,
  input  logic              f_start,
  output logic              f_busy,
  output ctrl_word_t        f_cw,
  input  logic              f_host_we,
  input  logic [DATA_W-1:0] f_host_addr,
  input  logic [DATA_W-1:0] f_host_wdata,
  output logic [DATA_W-1:0] f_host_rdata
);

  prog_cpu #(.PROGRAM(PROG_MULT)) u_prog (
    .clk       (clk),
    .rst       (p_rst),
    .pc        (p_pc),
    .cw        (p_cw),
    .mp        (p_mp),
    .flags     (p_flags),
    .host_we   (p_host_we),
    .host_addr (p_host_addr),
    .host_wdata(p_host_wdata),
    .host_rdata(p_host_rdata)
  );

  fsm_cpu u_fsm (
    .clk       (clk),
    .rst       (f_rst),
    .start     (f_start),
    .busy      (f_busy),
    .cw        (f_cw),
    .host_we   (f_host_we),
    .host_addr (f_host_addr),
    .host_wdata(f_host_wdata),
    .host_rdata(f_host_rdata)
  );

endmodule
