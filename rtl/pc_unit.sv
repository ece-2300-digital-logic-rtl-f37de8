// pc_unit: program counter of the programmable control unit.
//
// PC holds the ROM address of the control word being executed and is
// updated on every rising clock edge: to PC + 1 when MP = 0 (sequential
// execution) and to PC + SE(OFF) when MP = 1 (branch taken), where OFF is the
// two's complement branch offset of the current control word. Arithmetic is
// modulo 2^PC_W, so the PC wraps from the last ROM word to word 0.
//
// The incrementer, offset adder and MP-controlled multiplexer are the
// lecture's. The synchronous reset to word 0 and the widths are this
// design's own.
module pc_unit #(
  parameter int unsigned PC_W  = sc_pkg::PC_W,
  parameter int unsigned OFF_W = sc_pkg::OFF_W
) (
  input  logic             clk,
  input  logic             rst,   // synchronous, PC <= 0
  input  logic             mp,    // take the branch
  input  logic [OFF_W-1:0] off,   // branch offset
  output logic [PC_W-1:0]  pc
);

  logic [PC_W-1:0] off_ext, pc_inc, pc_br;

  sign_extend #(.IN_W(OFF_W), .OUT_W(PC_W)) u_se (
    .in (off),
    .out(off_ext)
  );

  assign pc_inc = pc + PC_W'(1);
  assign pc_br  = pc + off_ext;

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= mp ? pc_br : pc_inc;
  end

endmodule
