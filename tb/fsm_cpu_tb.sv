// fsm_cpu_tb: the hardwired multiplier on corner and random operands.
// Checks M[2] = A * B mod 256, that M[0] and M[1] are untouched, and the
// cycle count from START to the end of BUSY against
//   4 + sum over passes (3 + multiplier bit) + 1,
// with one pass per bit of B up to its highest 1 (one pass when B = 0).
module fsm_cpu_tb;
  import sc_pkg::*;
  logic clk = 0, rst, start, busy;
  ctrl_word_t cw;
  logic host_we;
  logic [7:0] host_addr, host_wdata, host_rdata;
  int checks = 0, failures = 0;

  fsm_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_cycles(logic [7:0] b);
    int n = 4 + 1;
    int passes = 1;
    for (int i = 0; i < 8; i++) if (b[i]) passes = i + 1;
    for (int i = 0; i < passes; i++) n += 3 + int'(b[i]);
    return n;
  endfunction

  task automatic hwrite(logic [7:0] a, logic [7:0] d);
    host_we = 1; host_addr = a; host_wdata = d;
    @(posedge clk); #1 host_we = 0;
  endtask

  task automatic run(logic [7:0] a, logic [7:0] b);
    int cyc = 0;
    hwrite(8'd0, a);
    hwrite(8'd1, b);
    hwrite(8'd2, 8'hEE);
    start = 1; @(posedge clk); #1 start = 0;
    while (busy) begin @(posedge clk); #1 cyc++; end
    host_addr = 8'd2; #1;
    checks++;
    if (host_rdata !== 8'(a * b)) begin
      failures++;
      $display("%0d * %0d: M[2]=%0d exp %0d", a, b, host_rdata, 8'(a * b));
    end
    checks++;
    if (cyc != exp_cycles(b)) begin
      failures++;
      $display("%0d * %0d: %0d cycles, expected %0d", a, b, cyc, exp_cycles(b));
    end
    host_addr = 8'd0; #1; checks++; if (host_rdata !== a) failures++;
    host_addr = 8'd1; #1; checks++; if (host_rdata !== b) failures++;
  endtask

  initial begin
    rst = 1; start = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    // idle until START
    repeat (5) @(posedge clk); #1;
    checks++; if (busy) failures++;
    run(8'd5, 8'd3);     // the lecture's 3-bit case
    run(8'd7, 8'd7);
    run(8'd0, 8'd6);
    run(8'd9, 8'd0);
    run(8'd255, 8'd255);
    run(8'd1, 8'd128);
    for (int t = 0; t < 60; t++) run(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
