// sc_top_tb: end-to-end test of both processors at their default sizes.
// For a series of operand pairs, the programmable processor and the
// hardwired multiplier each compute M[2] = M[0] * M[1]; both results are
// compared with A * B mod 256. The programmable processor is then left
// running through its no-op words and around the PC wrap into a second pass
// of the program, after which M[2] must still hold the product.
// Every mechanism is counted and must occur at least once: loads and stores,
// a branch on Z taken and not taken, a branch on Z' taken (backwards, with a
// negative offset) and not taken, the PC wrapping to 0, and in the hardwired
// unit the idle wait, the add, the skipped add and the loop back.
module sc_top_tb;
  import sc_pkg::*;
  logic clk = 0;
  logic p_rst, f_rst, f_start, f_busy;
  logic [3:0] p_pc;
  ctrl_word_t p_cw, f_cw;
  logic p_mp;
  flags_t p_flags;
  logic p_host_we, f_host_we;
  logic [7:0] p_host_addr, p_host_wdata, p_host_rdata;
  logic [7:0] f_host_addr, f_host_wdata, f_host_rdata;
  int checks = 0, failures = 0;

  int n_load = 0, n_store = 0, n_bz_taken = 0, n_bz_not = 0, n_bnz_taken = 0,
      n_bnz_not = 0, n_wrap = 0, n_f_idle = 0, n_f_add = 0, n_f_skip = 0, n_f_loop = 0;

  sc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters, sampled just before each edge
  ctrl_word_t f_prev;
  logic [3:0] p_prev;
  always @(negedge clk) begin
    if (!p_rst) begin
      if (p_cw.ld && p_cw.md) n_load++;
      if (p_cw.mw) n_store++;
      if (p_cw.bs == BS_ZERO)  begin if (p_mp) n_bz_taken++;  else n_bz_not++;  end
      if (p_cw.bs == BS_NZERO) begin if (p_mp) n_bnz_taken++; else n_bnz_not++; end
    end
    if (!f_rst) begin
      if (!f_busy && !f_start) n_f_idle++;
      if (f_cw.fs == FS_ADD && f_cw.ld && f_cw.dr == 3'd3 && f_cw.sb == 3'd1) n_f_add++;
      if (f_prev.fs == FS_AND && f_cw.fs == FS_SLL) n_f_skip++;
      if (f_prev.fs == FS_SRL && f_cw.fs == FS_AND) n_f_loop++;
      if (f_cw.ld && f_cw.md) n_load++;
      if (f_cw.mw) n_store++;
    end
    f_prev = f_cw;
  end
  always @(posedge clk) begin
    #1;
    if (!p_rst && p_prev == 4'd15 && p_pc == 4'd0) n_wrap++;
    p_prev = p_pc;
  end

  task automatic load_both(logic [7:0] a, logic [7:0] b);
    p_host_we = 1; f_host_we = 1;
    p_host_addr = 0; f_host_addr = 0; p_host_wdata = a; f_host_wdata = a;
    @(posedge clk); #1;
    p_host_addr = 1; f_host_addr = 1; p_host_wdata = b; f_host_wdata = b;
    @(posedge clk); #1;
    p_host_addr = 2; f_host_addr = 2; p_host_wdata = 8'hEE; f_host_wdata = 8'hEE;
    @(posedge clk); #1;
    p_host_we = 0; f_host_we = 0;
  endtask

  task automatic run(logic [7:0] a, logic [7:0] b, bit full_wrap);
    int guard = 0;
    p_rst = 1;
    load_both(a, b);
    repeat (2) @(posedge clk);  // hardwired unit idles
    #1 p_rst = 0; f_start = 1;
    @(posedge clk); #1 f_start = 0;
    while ((f_busy || p_pc != 4'd11) && guard < 300) begin
      @(posedge clk); #1 guard++;
    end
    if (full_wrap) begin
      // run on past the wrap and through a second pass of the program
      while (p_pc != 4'd0 && guard < 300) begin @(posedge clk); #1 guard++; end
      while (p_pc != 4'd11 && guard < 300) begin @(posedge clk); #1 guard++; end
    end
    p_host_addr = 2; f_host_addr = 2; #1;
    checks++;
    if (p_host_rdata !== 8'(a * b)) begin
      failures++;
      $display("programmable: %0d * %0d = %0d, expected %0d", a, b, p_host_rdata, 8'(a * b));
    end
    checks++;
    if (f_host_rdata !== 8'(a * b)) begin
      failures++;
      $display("hardwired: %0d * %0d = %0d, expected %0d", a, b, f_host_rdata, 8'(a * b));
    end
    checks++;
    if (guard >= 300) begin failures++; $display("no completion for %0d * %0d", a, b); end
  endtask

  initial begin
    p_rst = 1; f_rst = 1; f_start = 0;
    p_host_we = 0; p_host_addr = 0; p_host_wdata = 0;
    f_host_we = 0; f_host_addr = 0; f_host_wdata = 0;
    p_prev = 0;
    repeat (2) @(posedge clk); #1 f_rst = 0;
    run(8'd5, 8'd3, 1'b1);
    run(8'd6, 8'd5, 1'b0);
    run(8'd0, 8'd0, 1'b0);
    run(8'd200, 8'd77, 1'b1);
    for (int t = 0; t < 40; t++) run(8'($urandom), 8'($urandom), 1'b0);
    $display("loads=%0d stores=%0d bz_taken=%0d bz_not=%0d bnz_taken=%0d bnz_not=%0d wraps=%0d",
             n_load, n_store, n_bz_taken, n_bz_not, n_bnz_taken, n_bnz_not, n_wrap);
    $display("fsm: idle=%0d add=%0d skip=%0d loop=%0d", n_f_idle, n_f_add, n_f_skip, n_f_loop);
    checks++; if (n_load == 0)      begin failures++; $display("no load seen"); end
    checks++; if (n_store == 0)     begin failures++; $display("no store seen"); end
    checks++; if (n_bz_taken == 0)  begin failures++; $display("no taken branch on Z"); end
    checks++; if (n_bz_not == 0)    begin failures++; $display("no untaken branch on Z"); end
    checks++; if (n_bnz_taken == 0) begin failures++; $display("no taken branch on Z'"); end
    checks++; if (n_bnz_not == 0)   begin failures++; $display("no untaken branch on Z'"); end
    checks++; if (n_wrap == 0)      begin failures++; $display("no PC wrap"); end
    checks++; if (n_f_idle == 0)    begin failures++; $display("no idle wait"); end
    checks++; if (n_f_add == 0)     begin failures++; $display("no add in the hardwired unit"); end
    checks++; if (n_f_skip == 0)    begin failures++; $display("no skipped add"); end
    checks++; if (n_f_loop == 0)    begin failures++; $display("no loop back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
