// datapath: the single-cycle datapath, executing one control word per clock.
//
// In one clock period the register file reads registers SA and SB; the
// B-operand multiplexer passes DataB (MB = 0) or the sign-extended immediate
// (MB = 1); the ALU combines DataA with it under FS; the ALU result serves as
// the RAM address (M_address) while DataB is the RAM write data (Data_in);
// the write-back multiplexer picks the ALU result (MD = 0) or the RAM read
// data (MD = 1); and on the rising edge the register file stores that value in
// register DR when LD is high, and the RAM stores DataB when MW is high.
// Loads are therefore "R[DR] <= M[R[SA] + SE(IMM)]" and stores
// "M[R[SA] + SE(IMM)] <= R[SB]".
//
// Interface: CW is the control word (sc_pkg::ctrl_word_t; the BS and OFF
// fields are ignored here). FLAGS are the ALU condition codes of the word
// being executed, valid in the same cycle, for the control unit. ALU_Y and
// WB_DATA expose the ALU result and the write-back value for observation.
// HOST_* is the memory's host port (see data_ram).
//
// The connections follow the lecture's datapath drawing. The memory size
// (one word for every ALU result value) and the host port are this design's
// own choices.
module datapath
  import sc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  ctrl_word_t        cw,
  output flags_t            flags,
  output logic [DATA_W-1:0] alu_y,
  output logic [DATA_W-1:0] wb_data,
  input  logic              host_we,
  input  logic [DATA_W-1:0] host_addr,
  input  logic [DATA_W-1:0] host_wdata,
  output logic [DATA_W-1:0] host_rdata
);

  logic [DATA_W-1:0] data_a, data_b, imm_ext, b_op, ram_rdata;

  reg_file #(.DATA_W(DATA_W), .ADDR_W(REG_AW)) u_rf (
    .clk   (clk),
    .rst   (rst),
    .ld    (cw.ld),
    .sa    (cw.sa),
    .sb    (cw.sb),
    .dr    (cw.dr),
    .d_in  (wb_data),
    .data_a(data_a),
    .data_b(data_b)
  );

  sign_extend #(.IN_W(IMM_W), .OUT_W(DATA_W)) u_se (
    .in (cw.imm),
    .out(imm_ext)
  );

  assign b_op = cw.mb ? imm_ext : data_b;

  alu #(.DATA_W(DATA_W)) u_alu (
    .a    (data_a),
    .b    (b_op),
    .fs   (cw.fs),
    .y    (alu_y),
    .flags(flags)
  );

  data_ram #(.DATA_W(DATA_W), .ADDR_W(DATA_W)) u_ram (
    .clk       (clk),
    .we        (cw.mw),
    .addr      (alu_y),
    .wdata     (data_b),
    .rdata     (ram_rdata),
    .host_we   (host_we),
    .host_addr (host_addr),
    .host_wdata(host_wdata),
    .host_rdata(host_rdata)
  );

  assign wb_data = cw.md ? ram_rdata : alu_y;

endmodule
