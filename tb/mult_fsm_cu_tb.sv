// mult_fsm_cu_tb: walks the multiplier control unit through its states with
// random Z flags, tracking the expected state here and checking the control
// word of every state against the lecture's table, plus BUSY and the idle
// wait for START.
module mult_fsm_cu_tb;
  import sc_pkg::*;
  logic clk = 0, rst, start, busy;
  flags_t flags;
  ctrl_word_t cw;
  int checks = 0, failures = 0;
  int st;  // expected state, 0 = idle, 1..9 = S1..S9
  int n_skip = 0, n_loop = 0;

  mult_fsm_cu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DR SA SB IMM MB FS MD LD MW of S1..S9 (-1 = don't care)
  int tbl [10][9] = '{
    '{-1, -1, -1, -1, -1, -1, -1,  0,  0},
    '{ 0,  0,  0, -1,  0,  1,  0,  1,  0},
    '{ 1,  0, -1,  0,  1,  0,  1,  1,  0},
    '{ 2,  0, -1,  1,  1,  0,  1,  1,  0},
    '{ 3,  3,  3, -1,  0,  1,  0,  1,  0},
    '{ 4,  2, -1,  1,  1,  2,  0,  1,  0},
    '{ 3,  3,  1, -1,  0,  0,  0,  1,  0},
    '{ 1,  1, -1, -1, -1,  3,  0,  1,  0},
    '{ 2,  2, -1, -1, -1,  4,  0,  1,  0},
    '{-1,  0,  3,  2,  1,  0, -1,  0,  1}};

  task automatic chk_word();
    int got [9];
    got = '{int'(cw.dr), int'(cw.sa), int'(cw.sb), int'(cw.imm), int'(cw.mb),
            int'(cw.fs), int'(cw.md), int'(cw.ld), int'(cw.mw)};
    for (int f = 0; f < 9; f++) begin
      if (tbl[st][f] >= 0) begin
        checks++;
        if (got[f] != tbl[st][f]) begin
          failures++;
          $display("state %0d field %0d = %0d, expected %0d", st, f, got[f], tbl[st][f]);
        end
      end
    end
    checks++;
    if (busy !== (st != 0)) failures++;
  endtask

  initial begin
    rst = 1; start = 0; flags = '0;
    @(posedge clk); #1 rst = 0;
    st = 0;
    for (int t = 0; t < 3000; t++) begin
      start = ($urandom_range(0, 3) == 0);
      flags = flags_t'($urandom);
      #1;
      chk_word();
      @(posedge clk);
      case (st)
        0: st = start ? 1 : 0;
        5: begin st = flags.z ? 7 : 6; if (flags.z) n_skip++; end
        8: begin st = flags.z ? 9 : 5; if (!flags.z) n_loop++; end
        9: st = 0;
        default: st = st + 1;
      endcase
      #1;
    end
    checks++;
    if (n_skip == 0 || n_loop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
