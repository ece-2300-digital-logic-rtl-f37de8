// control_rom: read-only memory of control words, addressed by the PC.
//
// Combinational: WORD is ROM[ADDR] in the same cycle. The ROM has 2^PC_W
// words. Its contents are the program chosen by PROGRAM (see
// sc_pkg::rom_word); words past the end of the program are no-ops.
//   PROGRAM = PROG_MULT (default): shift-and-add multiplication in words
//     0..10, M[2] = M[0] * M[1], with the two conditional branches
//     "if (R4 = 0) goto 7" (word 5, BS = Z, OFF = 2) and
//     "if (R2 != 0) goto 4" (word 9, BS = Z', OFF = -5).
//   PROGRAM = PROG_EXAMPLE: the four-word sequence R2 <= R0 + R1,
//     R1 <= M[R2], M[R2] <= R0, R3 <= R0 + 3.
// Both programs are the lecture's; the don't-care fields of its tables are
// filled with zeros.
module control_rom
  import sc_pkg::*;
#(
  parameter int unsigned PROGRAM = sc_pkg::PROG_MULT,
  parameter int unsigned ADDR_W  = sc_pkg::PC_W
) (
  input  logic [ADDR_W-1:0] addr,
  output ctrl_word_t        word
);

  ctrl_word_t rom [2**ADDR_W];

  always_comb begin
    for (int i = 0; i < 2**ADDR_W; i++) rom[i] = rom_word(PROGRAM, i);
  end

  assign word = rom[addr];

endmodule
