// control_rom_tb: every word of the multiplication program compared field by
// field with the program table written out here, and the remaining words
// checked to be no-ops (no load, no write, no branch).
module control_rom_tb;
  import sc_pkg::*;
  logic [3:0] addr;
  ctrl_word_t word;
  int checks = 0, failures = 0;

  control_rom #(.PROGRAM(PROG_MULT), .ADDR_W(4)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected fields of words 0..10; -1 marks a don't-care
  //                     DR  SA  SB IMM  MB  FS   MD  LD  MW  BS  OFF
  int tbl [11][11] = '{
    '{ 0,  0,  0, -1,  0,  1,  0,  1,  0,  0, -1},
    '{ 1,  0, -1,  0,  1,  0,  1,  1,  0,  0, -1},
    '{ 2,  0, -1,  1,  1,  0,  1,  1,  0,  0, -1},
    '{ 3,  3,  3, -1,  0,  1,  0,  1,  0,  0, -1},
    '{ 4,  2, -1,  1,  1,  2,  0,  1,  0,  0, -1},
    '{-1,  4, -1,  0,  1,  1, -1,  0,  0,  2,  2},
    '{ 3,  3,  1, -1,  0,  0,  0,  1,  0,  0, -1},
    '{ 1,  1, -1, -1, -1,  3,  0,  1,  0,  0, -1},
    '{ 2,  2, -1, -1, -1,  4,  0,  1,  0,  0, -1},
    '{-1,  2, -1,  0,  1,  1, -1,  0,  0,  3, 11},
    '{-1,  0,  3,  2,  1,  0, -1,  0,  1,  0, -1}};

  task automatic chk(int a, int field, int got);
    if (tbl[a][field] >= 0) begin
      checks++;
      if (got != tbl[a][field]) begin
        failures++;
        $display("word %0d field %0d = %0d, expected %0d", a, field, got, tbl[a][field]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a); #1;
      if (a < 11) begin
        chk(a, 0, int'(word.dr));  chk(a, 1, int'(word.sa));  chk(a, 2, int'(word.sb));
        chk(a, 3, int'(word.imm)); chk(a, 4, int'(word.mb));  chk(a, 5, int'(word.fs));
        chk(a, 6, int'(word.md));  chk(a, 7, int'(word.ld));  chk(a, 8, int'(word.mw));
        chk(a, 9, int'(word.bs));  chk(a, 10, int'(word.off));
      end else begin
        checks++;
        if (word.ld || word.mw || word.bs != BS_NEVER) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
