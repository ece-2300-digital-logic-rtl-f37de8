// branch_select_tb: all BS codes against all 16 flag combinations, expected
// MP from the branch table.
module branch_select_tb;
  import sc_pkg::*;
  bs_e bs;
  flags_t flags;
  logic mp;
  int checks = 0, failures = 0;

  branch_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    for (int s = 0; s < 8; s++) begin
      for (int f = 0; f < 16; f++) begin
        bs = bs_e'(s); flags = flags_t'(f); #1;
        case (s)
          0: e = 0;
          1: e = 1;
          2: e = flags.z;
          3: e = !flags.z;
          4: e = flags.n;
          5: e = !flags.n;
          6: e = flags.c;
          default: e = flags.v;
        endcase
        checks++;
        if (mp !== e) begin
          failures++;
          $display("bs=%b flags=%b mp=%b exp %b", bs, flags, mp, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
