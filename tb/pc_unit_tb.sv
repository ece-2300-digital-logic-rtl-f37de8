// pc_unit_tb: the PC counts up by one when MP = 0 and jumps by the signed
// offset when MP = 1, wrapping modulo 16; reset returns it to 0.
module pc_unit_tb;
  logic clk = 0, rst, mp;
  logic [3:0] off, pc;
  int checks = 0, failures = 0;
  int exp_pc;

  pc_unit #(.PC_W(4), .OFF_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int so;
    rst = 1; mp = 0; off = 0;
    @(posedge clk); #1 rst = 0;
    exp_pc = 0;
    checks++; if (pc !== 4'd0) failures++;
    for (int t = 0; t < 500; t++) begin
      mp = (t % 3 == 0) ? 1'($urandom) : 1'b0;
      off = 4'($urandom);
      so = (off > 7) ? int'(off) - 16 : int'(off);
      @(posedge clk); #1;
      exp_pc = mp ? (exp_pc + so + 16) % 16 : (exp_pc + 1) % 16;
      checks++;
      if (pc !== 4'(exp_pc)) begin
        failures++;
        $display("t=%0d pc=%0d exp %0d", t, pc, exp_pc);
      end
    end
    // the program's two branches: 5 + 2 = 7, 9 - 5 = 4
    rst = 1; @(posedge clk); #1 rst = 0; mp = 0;
    repeat (5) @(posedge clk);
    #1 mp = 1; off = 4'd2; @(posedge clk); #1;
    checks++; if (pc !== 4'd7) failures++;
    mp = 0; repeat (2) @(posedge clk);
    #1 mp = 1; off = 4'hB; @(posedge clk); #1;
    checks++; if (pc !== 4'd4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
