// prog_cpu: single-cycle processor with a programmable control unit.
//
// The PC addresses the control ROM; the control word read drives the
// datapath for one cycle; the ALU condition codes of that same word go
// through branch_select, whose output MP decides whether the next PC is
// PC + 1 or PC + SE(OFF). A compare (for example R4 - 0) and the branch that
// tests it are therefore one control word, as in the lecture's program.
//
// With the default program, hold RST high while placing A in memory word 0
// and B in word 1 through the host port, then release it: the product
// appears in word 2 when the PC reaches word 11. The PC then runs through
// the no-op words and wraps to 0, repeating the program (which leaves word 2
// unchanged). Timing: one control word per cycle; word k executes in the
// k-th cycle after reset is released, until the first branch.
//
// PC, ROM, branch select and datapath and their connections follow the
// lecture; the host port and the reset are this design's own.
module prog_cpu
  import sc_pkg::*;
#(
  parameter int unsigned PROGRAM = sc_pkg::PROG_MULT
) (
  input  logic              clk,
  input  logic              rst,
  output logic [PC_W-1:0]   pc,
  output ctrl_word_t        cw,        // control word being executed
  output logic              mp,        // branch taken this cycle
  output flags_t            flags,     // ALU condition codes this cycle
  input  logic              host_we,
  input  logic [DATA_W-1:0] host_addr,
  input  logic [DATA_W-1:0] host_wdata,
  output logic [DATA_W-1:0] host_rdata
);

  logic [DATA_W-1:0] alu_y, wb_data;

  pc_unit #(.PC_W(PC_W), .OFF_W(OFF_W)) u_pc (
    .clk(clk),
    .rst(rst),
    .mp (mp),
    .off(cw.off),
    .pc (pc)
  );

  control_rom #(.PROGRAM(PROGRAM), .ADDR_W(PC_W)) u_rom (
    .addr(pc),
    .word(cw)
  );

  branch_select u_bsel (
    .bs   (cw.bs),
    .flags(flags),
    .mp   (mp)
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
