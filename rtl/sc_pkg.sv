// sc_pkg: widths, encodings and the control word shared by the single-cycle
// processor.
//
// The processor executes one control word per clock cycle. A control word
// names two source registers (SA, SB), a destination register (DR), a 4-bit
// immediate (IMM), the B-operand select (MB: 0 = register, 1 = sign-extended
// IMM), the ALU function (FS), the RF write-back select (MD: 0 = ALU result,
// 1 = RAM read data), the register load enable (LD), the RAM write enable (MW)
// and, for the programmable control unit, a branch select (BS) and a branch
// offset (OFF).
//
// Taken from the lecture: 8-bit data and a 4-bit immediate ("Assume IMM is 4
// bits and DataA is 8 bits wide"), 3-bit register fields (the control word
// tables use register numbers 000..100), the field list of the control word
// and the BS codes of the branch table. This design's own choices: the binary
// encoding of FS, the 4-bit OFF field and the 4-bit program counter.
package sc_pkg;

  localparam int unsigned DATA_W = 8;  // n: register and memory word width
  localparam int unsigned REG_AW = 3;  // k: register address width (8 registers)
  localparam int unsigned IMM_W  = 4;  // immediate field width
  localparam int unsigned OFF_W  = 4;  // branch offset field width (two's complement)
  localparam int unsigned PC_W   = 4;  // program counter width (16 ROM words)

  // ALU function select
  typedef enum logic [3:0] {
    FS_ADD = 4'd0,
    FS_SUB = 4'd1,
    FS_AND = 4'd2,
    FS_SLL = 4'd3,
    FS_SRL = 4'd4
  } fs_e;

  // Branch select: which condition drives MP (codes from the branch table)
  typedef enum logic [2:0] {
    BS_NEVER  = 3'b000,  // MP = 0
    BS_ALWAYS = 3'b001,  // MP = 1
    BS_ZERO   = 3'b010,  // MP = Z
    BS_NZERO  = 3'b011,  // MP = Z'
    BS_NEG    = 3'b100,  // MP = N
    BS_NNEG   = 3'b101,  // MP = N'
    BS_CARRY  = 3'b110,  // MP = C
    BS_OVF    = 3'b111   // MP = V
  } bs_e;

  typedef struct packed {
    logic [REG_AW-1:0] dr;
    logic [REG_AW-1:0] sa;
    logic [REG_AW-1:0] sb;
    logic [IMM_W-1:0]  imm;
    logic              mb;
    fs_e               fs;
    logic              md;
    logic              ld;
    logic              mw;
    bs_e               bs;
    logic [OFF_W-1:0]  off;
  } ctrl_word_t;

  // ALU condition codes
  typedef struct packed {
    logic v;  // two's complement overflow
    logic c;  // carry out
    logic z;  // result is zero
    logic n;  // result is negative (MSB)
  } flags_t;

  // Builds a control word; don't-care fields of the lecture's tables are 0.
  function automatic ctrl_word_t make_cw(
      input logic [REG_AW-1:0] dr, input logic [REG_AW-1:0] sa,
      input logic [REG_AW-1:0] sb, input logic [IMM_W-1:0] imm,
      input logic mb, input fs_e fs, input logic md, input logic ld,
      input logic mw, input bs_e bs = BS_NEVER, input logic [OFF_W-1:0] off = '0);
    ctrl_word_t w;
    w.dr  = dr;  w.sa = sa;  w.sb = sb;  w.imm = imm;  w.mb = mb;
    w.fs  = fs;  w.md = md;  w.ld = ld;  w.mw  = mw;   w.bs = bs;
    w.off = off;
    return w;
  endfunction

  // A word that changes nothing: no register load, no memory write, no branch.
  localparam ctrl_word_t CW_NOP = '{dr: '0, sa: '0, sb: '0, imm: '0, mb: 1'b0,
                                    fs: FS_ADD, md: 1'b0, ld: 1'b0, mw: 1'b0,
                                    bs: BS_NEVER, off: '0};

  // ROM programs selectable by control_rom's PROGRAM parameter.
  localparam int unsigned PROG_MULT    = 0;  // shift-and-add multiplication, M[2] = M[0]*M[1]
  localparam int unsigned PROG_EXAMPLE = 1;  // four-word example sequence

  // Contents of ROM word `addr` of program `prog`. Words past the end of a
  // program are no-ops.
  function automatic ctrl_word_t rom_word(input int unsigned prog, input int unsigned addr);
    ctrl_word_t w;
    w = CW_NOP;
    if (prog == PROG_MULT) begin
      case (addr)
        //              DR    SA    SB    IMM   MB    FS      MD    LD    MW    [BS       OFF]
        0:  w = make_cw(3'd0, 3'd0, 3'd0, 4'd0, 1'b0, FS_SUB, 1'b0, 1'b1, 1'b0);               // R0 <= R0 - R0
        1:  w = make_cw(3'd1, 3'd0, 3'd0, 4'd0, 1'b1, FS_ADD, 1'b1, 1'b1, 1'b0);               // R1 <= M[R0]
        2:  w = make_cw(3'd2, 3'd0, 3'd0, 4'd1, 1'b1, FS_ADD, 1'b1, 1'b1, 1'b0);               // R2 <= M[R0+1]
        3:  w = make_cw(3'd3, 3'd3, 3'd3, 4'd0, 1'b0, FS_SUB, 1'b0, 1'b1, 1'b0);               // R3 <= R3 - R3
        4:  w = make_cw(3'd4, 3'd2, 3'd0, 4'd1, 1'b1, FS_AND, 1'b0, 1'b1, 1'b0);               // R4 <= R2 & 1
        5:  w = make_cw(3'd0, 3'd4, 3'd0, 4'd0, 1'b1, FS_SUB, 1'b0, 1'b0, 1'b0, BS_ZERO,  4'd2);    // if (R4 = 0) goto 7
        6:  w = make_cw(3'd3, 3'd3, 3'd1, 4'd0, 1'b0, FS_ADD, 1'b0, 1'b1, 1'b0);               // R3 <= R3 + R1
        7:  w = make_cw(3'd1, 3'd1, 3'd0, 4'd0, 1'b0, FS_SLL, 1'b0, 1'b1, 1'b0);               // R1 <= SLL(R1)
        8:  w = make_cw(3'd2, 3'd2, 3'd0, 4'd0, 1'b0, FS_SRL, 1'b0, 1'b1, 1'b0);               // R2 <= SRL(R2)
        9:  w = make_cw(3'd0, 3'd2, 3'd0, 4'd0, 1'b1, FS_SUB, 1'b0, 1'b0, 1'b0, BS_NZERO, 4'hB);    // if (R2 != 0) goto 4 (OFF = -5)
        10: w = make_cw(3'd0, 3'd0, 3'd3, 4'd2, 1'b1, FS_ADD, 1'b0, 1'b0, 1'b1);               // M[R0+2] <= R3
        default: w = CW_NOP;
      endcase
    end else if (prog == PROG_EXAMPLE) begin
      case (addr)
        0: w = make_cw(3'd2, 3'd0, 3'd1, 4'd0, 1'b0, FS_ADD, 1'b0, 1'b1, 1'b0);                // R2 <= R0 + R1
        1: w = make_cw(3'd1, 3'd2, 3'd0, 4'd0, 1'b1, FS_ADD, 1'b1, 1'b1, 1'b0);                // R1 <= M[R2]
        2: w = make_cw(3'd0, 3'd2, 3'd0, 4'd0, 1'b1, FS_ADD, 1'b0, 1'b0, 1'b1);                // M[R2] <= R0
        3: w = make_cw(3'd3, 3'd0, 3'd0, 4'd3, 1'b1, FS_ADD, 1'b0, 1'b1, 1'b0);                // R3 <= R0 + 3
        default: w = CW_NOP;
      endcase
    end
    return w;
  endfunction

endpackage
